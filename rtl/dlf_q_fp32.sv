// dlf_q_fp32: quantizer Q(.) from IEEE FP32 to DLFloat16, round-nearest-up.
//
// In mixed-precision training the master weights are updated in FP32 and
// each update is quantized to DLFloat16 for the next pass. The FP32 value is
// split into sign, exponent (bias 127) and the top 9 fraction bits plus the
// next bit as guard; the DLFloat16 biased exponent is e - 127 + 31. Rounding
// and packing reuse dlf_round_pack, so results too large for DLFloat16 become
// NaN-infinity (with the flag) and results too small flush to zero. FP32
// infinities and NaNs map to NaN-infinity, FP32 zeros and subnormals to zero.
// Combinational. The rounding mode follows the document; the treatment of
// out-of-range values is this design's choice.
module dlf_q_fp32
  import dlf_pkg::*;
(
  input  logic [31:0] x,
  output logic [15:0] r,
  output logic        naninf
);

  logic  [7:0] e8;
  xexp_t       rexp;
  logic        is_special, is_zero;

  always_comb begin
    e8         = x[30:23];
    is_special = (e8 == 8'hFF);
    is_zero    = (e8 == 8'h00);
    rexp       = xexp_t'({2'b00, e8}) - xexp_t'(127 - BIAS);
  end

  dlf_round_pack u_round (
    .sign(x[31]), .rexp(rexp), .sig({1'b1, x[22 -: FRAC_W]}), .guard(x[22 - FRAC_W]),
    .zero_in(is_zero), .naninf_in(is_special), .r(r), .naninf(naninf)
  );

endmodule
