// dlf_exp_adjust: result exponent ("EXP") of the DLFloat16 FMA.
//
// The biased exponent of the normalized, unrounded result is the exponent
// of window bit 33, less the LZA shift count, plus the normalizer's one-bit
// correction. The result may lie outside 0..63; the rounder turns that into
// zero or NaN-infinity. Combinational.
module dlf_exp_adjust
  import dlf_pkg::*;
(
  input  xexp_t                    wexp,
  input  logic [$clog2(WIN_W)-1:0] lz,
  input  logic signed [1:0]        adj,
  output xexp_t                    rexp
);

  always_comb rexp = wexp - xexp_t'({1'b0, lz}) + xexp_t'(adj);

endmodule
