// dlf_unpack: operand unpack of the DLFloat16 FMA.
//
// Splits one 16-bit operand into sign, biased exponent and 10-bit
// significand (hidden bit included) and flags zero and NaN-infinity, as the
// DLFloat16 encoding defines them: exponent 0 with fraction 0 is zero (sign
// ignored), exponent 63 with fraction 511 is NaN-infinity (sign ignored),
// everything else is a normal number with a hidden 1 (no subnormals).
//
// With fp8 = 1 the operand is an 8-bit value in x[7:0] (1 sign, 5 exponent,
// 2 fraction bits) and is widened exactly to DLFloat16: exponent + 16 (bias
// 15 to bias 31), fraction padded with zeros. The FP8 bias and its special
// encodings (zero = all-zero exponent and fraction, NaN-infinity = all ones)
// are this design's choice. Purely combinational.
module dlf_unpack
  import dlf_pkg::*;
(
  input  logic [15:0] x,
  input  logic        fp8,
  output unpacked_t   u
);

  logic              s;
  logic [EXP_W-1:0]  e;
  logic [FRAC_W-1:0] f;
  logic              e_min, e_max, f_zero, f_ones;

  localparam int F8_W = 1 + FP8_EXP_W + FP8_FRAC_W;   // 8

  logic [FP8_EXP_W-1:0]  e8;
  logic [FP8_FRAC_W-1:0] f8;
  assign e8 = x[F8_W-2 -: FP8_EXP_W];
  assign f8 = x[FP8_FRAC_W-1:0];

  always_comb begin
    if (fp8) begin
      s      = x[F8_W-1];
      e      = EXP_W'(e8) + EXP_W'(BIAS - FP8_BIAS);
      f      = {f8, {(FRAC_W-FP8_FRAC_W){1'b0}}};
      e_min  = (e8 == '0);
      e_max  = (e8 == '1);
      f_zero = (f8 == '0);
      f_ones = (f8 == '1);
    end else begin
      s      = x[15];
      e      = x[14:9];
      f      = x[8:0];
      e_min  = (e == '0);
      e_max  = (e == '1);
      f_zero = (f == '0);
      f_ones = (f == '1);
    end
    u.sign   = s;
    u.exp    = e;
    u.zero   = e_min & f_zero;
    u.naninf = e_max & f_ones;
    u.sig    = u.zero ? '0 : {1'b1, f};
  end

endmodule
