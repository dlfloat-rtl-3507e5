// dlf_adder: end adder of the DLFloat16 FMA ("sum / abs difference").
//
// Adds the two carry-save vectors from the 3:2 row plus a carry-in, in
// W+1 bits two's complement (W = 34 magnitude bits and a sign). The sum is
// split at bit LOW: the LOW least significant bits are added on their own
// and their carry-out is the carry-in of the core adder for bits [W:LOW]
// (33 bits: 32 magnitude bits and the sign). In the FMA the product's two
// lowest window bits are always zero, so the low part only combines the
// addend's bottom bits with the carry-in: the 34-bit adder is a 32-bit
// adder with a carry-in.
//
// In an effective subtraction the addend arrives inverted and the carry-in
// is 1 (0 when the aligner's sticky bit asks for one more borrow). When the
// sum is negative it is negated, so the block always returns the W-bit
// magnitude and a flag telling which operand was larger. The magnitude of an
// FMA sum never exceeds 34 bits. Combinational; the conditional two's
// complement for the absolute difference is this design's choice.
module dlf_adder #(
  parameter int W   = 34,
  parameter int LOW = 2
) (
  input  logic [W:0]   a,
  input  logic [W:0]   b,
  input  logic         cin,
  output logic [W-1:0] mag,
  output logic         neg
);

  logic [LOW:0]   lo;      // low sum with its carry-out
  logic [W-LOW:0] hi;      // core adder, carry-in from the low part
  logic [W:0]     s;

  always_comb begin
    lo  = {1'b0, a[LOW-1:0]} + {1'b0, b[LOW-1:0]} + (LOW+1)'(cin);
    hi  = a[W:LOW] + b[W:LOW] + (W-LOW+1)'(lo[LOW]);
    s   = {hi, lo[LOW-1:0]};
    neg = s[W];
    mag = neg ? W'(~s + 1'b1) : s[W-1:0];
  end

endmodule
