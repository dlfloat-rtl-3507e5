// dlf_round_pack: round-nearest-up rounding and packing to DLFloat16.
//
// Rounding: the 10-bit significand is incremented when the guard bit is 1
// and truncated when it is 0, whatever lies below (round-nearest-up, ties
// away from zero in magnitude); this is why no sticky bit is kept anywhere
// in the datapath. A carry out of the significand bumps the exponent.
// Packing, after rounding, with rexp the biased exponent:
//   naninf_in                           -> NaN-infinity, flag
//   zero_in                             -> 0x0000 (zero is unsigned)
//   rexp > 63, or 63 with fraction 511  -> NaN-infinity, flag (overflow)
//   rexp < 0, or 0 with fraction 0      -> 0x0000 (no subnormals: flush)
//   otherwise                           -> {sign, rexp, fraction}
// NaN-infinity is emitted with sign 0. The rounding rule and encodings
// follow the document; overflow to NaN-infinity and flushing underflow to
// zero are this design's choice. Combinational; also used by the FP32
// quantizer.
module dlf_round_pack
  import dlf_pkg::*;
(
  input  logic             sign,
  input  xexp_t            rexp,
  input  logic [SIG_W-1:0] sig,      // normalized, sig[SIG_W-1] = 1
  input  logic             guard,
  input  logic             zero_in,
  input  logic             naninf_in,
  output logic [15:0]      r,
  output logic             naninf    // exception flag
);

  logic [SIG_W:0]    rnd;
  logic [FRAC_W-1:0] frac;
  xexp_t             e;

  always_comb begin
    rnd  = {1'b0, sig} + (SIG_W+1)'(guard);
    if (rnd[SIG_W]) begin
      frac = '0;
      e    = rexp + xexp_t'(1);
    end else begin
      frac = rnd[FRAC_W-1:0];
      e    = rexp;
    end
    naninf = 1'b0;
    if (naninf_in) begin
      r      = NANINF;
      naninf = 1'b1;
    end else if (zero_in) begin
      r = ZERO;
    end else if (e > xexp_t'(EXP_MAX) || (e == xexp_t'(EXP_MAX) && frac == '1)) begin
      r      = NANINF;
      naninf = 1'b1;
    end else if (e < 0 || (e == 0 && frac == '0)) begin
      r = ZERO;
    end else begin
      r = {sign, e[EXP_W-1:0], frac};
    end
  end

endmodule
