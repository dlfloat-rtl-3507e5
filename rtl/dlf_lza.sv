// dlf_lza: leading-zero anticipator over the 34-bit FMA sum.
//
// Predicts, from the two adder inputs and in parallel with the adder, how
// far the 34-bit magnitude of a + b (+ carry-in) must be shifted left to
// bring its leading one to bit W-1. From the per-bit propagate (t = a^b),
// generate (g = a&b) and kill (z = ~a&~b) signals it builds the indicator
//   f[i] = t[i+1] & (g[i]&~z[i-1] | z[i]&~g[i-1])
//        | ~t[i+1] & (z[i]&~z[i-1] | g[i]&~g[i-1])
// over all W+1 bits (t[W+1] = 0, g[-1] = 0, z[-1] = 1). Its leading one lies
// within one position of the leading one of |a + b + cin| (either side), and
// the count returned is W-1 minus that position, floored at 0. The
// normalizer absorbs the remaining error of one position in either
// direction. The carry-in is not looked at. Inputs are W+1 bits two's
// complement; output 0..W-1. Combinational. The indicator equations are this
// design's choice; the document fixes only the 34-bit width.
module dlf_lza #(
  parameter int W = 34
) (
  input  logic [W:0]           a,
  input  logic [W:0]           b,
  output logic [$clog2(W)-1:0] lz
);

  logic [W+1:0] t;       // t[W+1] = 0
  logic [W:-1]  g, z;    // g[-1] = 0, z[-1] = 1
  logic [W:0]   f;
  int           lead;

  always_comb begin
    t = {1'b0, a ^ b};
    g = {a & b, 1'b0};
    z = {~(a | b), 1'b1};
    for (int i = 0; i <= W; i++) begin
      f[i] = (t[i+1] & ((g[i] & ~z[i-1]) | (z[i] & ~g[i-1])))
           | (~t[i+1] & ((z[i] & ~z[i-1]) | (g[i] & ~g[i-1])));
    end
    lead = 0;
    for (int i = 0; i <= W; i++) begin   // highest set bit wins
      if (f[i]) lead = i;
    end
    lz = (lead >= W - 1) ? '0 : $clog2(W)'(W - 1 - lead);
  end

endmodule
