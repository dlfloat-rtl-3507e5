// dlf_csa32: 3:2 carry-save adder, a row of W full adders.
//
// sum + carry == a + b + c (mod 2^W). The carry vector is returned already
// shifted left by one position (its top bit dropped, modulo arithmetic), so
// carry[0] is always 0.
// Used three levels deep in the Booth multiplier and once to merge the
// aligned addend with the product's carry-save pair. Combinational.
module dlf_csa32 #(
  parameter int W = 34
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  logic [W-2:0] maj;   // the top majority bit would carry out of W bits

  always_comb begin
    sum   = a ^ b ^ c;
    maj   = (a[W-2:0] & b[W-2:0]) | (a[W-2:0] & c[W-2:0]) | (b[W-2:0] & c[W-2:0]);
    carry = {maj, 1'b0};
  end

endmodule
