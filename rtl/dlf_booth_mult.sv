// dlf_booth_mult: 10x10-bit radix-4 Booth multiplier of the DLFloat16 FMA.
//
// Multiplies two unsigned N-bit significands (hidden bit included). The
// multiplier y is recoded into N/2+1 = 6 radix-4 Booth digits in {-2..+2};
// each selects 0, +-x or +-2x, shifted by two bits per digit, giving six
// signed partial products. Three levels of 3:2 carry-save adders reduce them
// to two vectors (6 -> 4 -> 3 -> 2), which leave the block unadded: the
// FMA merges them with the aligned addend in one more 3:2 row.
//
// Partial products are sign-extended to OUT_W bits, so the two outputs
// satisfy sum + carry == x * y (mod 2^OUT_W); carry[0] is always 0. OUT_W
// defaults to 33 so that the pair can be placed directly, two bits up, in
// the FMA's 35-bit signed adder window. The digit count and CSA depth follow the document; the
// output width and the sign handling are this design's choice.
// Combinational.
module dlf_booth_mult #(
  parameter int N     = 10,
  parameter int OUT_W = 33
) (
  input  logic [N-1:0]     x,
  input  logic [N-1:0]     y,
  output logic [OUT_W-1:0] sum,
  output logic [OUT_W-1:0] carry
);

  localparam int NPP = N / 2 + 1;   // 6 Booth terms for N = 10

  logic [OUT_W-1:0] pp [NPP];
  logic [N+2:0]     yext;           // {00, y, 0}

  always_comb begin
    yext = {2'b00, y, 1'b0};
    for (int i = 0; i < NPP; i++) begin
      logic [2:0]       grp;
      logic [OUT_W-1:0] mag;
      grp = yext[2*i +: 3];
      unique case (grp)
        3'b001, 3'b010, 3'b101, 3'b110: mag = OUT_W'(x);
        3'b011, 3'b100:                 mag = OUT_W'(x) << 1;
        default:                        mag = '0;
      endcase
      mag   = mag << (2 * i);
      pp[i] = grp[2] ? (~mag + 1'b1) : mag;   // negative digits
    end
  end

  // Level 1: 6 -> 4
  logic [OUT_W-1:0] s1a, c1a, s1b, c1b;
  dlf_csa32 #(.W(OUT_W)) u_l1a (.a(pp[0]), .b(pp[1]), .c(pp[2]), .sum(s1a), .carry(c1a));
  dlf_csa32 #(.W(OUT_W)) u_l1b (.a(pp[3]), .b(pp[4]), .c(pp[5]), .sum(s1b), .carry(c1b));
  // Level 2: 4 -> 3
  logic [OUT_W-1:0] s2, c2;
  dlf_csa32 #(.W(OUT_W)) u_l2 (.a(s1a), .b(c1a), .c(s1b), .sum(s2), .carry(c2));
  // Level 3: 3 -> 2
  dlf_csa32 #(.W(OUT_W)) u_l3 (.a(s2), .b(c2), .c(c1b), .sum(sum), .carry(carry));

endmodule
