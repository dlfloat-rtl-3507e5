// dlf_normalizer: normalization shifter of the DLFloat16 FMA.
//
// Shifts the 34-bit sum magnitude left by the count anticipated by the LZA,
// into a 35-bit field so that a count one too large is not lost. The leading
// one then sits at bit 34, 33 or 32; a final 1-bit correction picks the
// 10 significand bits below it and the guard bit right after them, and
// reports the exponent correction (+1, 0 or -1). Because round-nearest-up
// decides on the guard bit alone, no sticky bit is formed here. A zero
// magnitude is flagged. Combinational.
module dlf_normalizer
  import dlf_pkg::*;
(
  input  logic [WIN_W-1:0]         mag,
  input  logic [$clog2(WIN_W)-1:0] lz,
  output logic [SIG_W-1:0]         sig,
  output logic                     guard,
  output logic signed [1:0]        adj,
  output logic                     zero
);

  logic [WIN_W:0] sh;

  always_comb begin
    sh   = {1'b0, mag} << lz;
    zero = (mag == '0);
    if (sh[WIN_W]) begin
      sig   = sh[WIN_W -: SIG_W];
      guard = sh[WIN_W - SIG_W];
      adj   = 2'sd1;
    end else if (sh[WIN_W-1]) begin
      sig   = sh[WIN_W-1 -: SIG_W];
      guard = sh[WIN_W-1 - SIG_W];
      adj   = 2'sd0;
    end else begin
      sig   = sh[WIN_W-2 -: SIG_W];
      guard = sh[WIN_W-2 - SIG_W];
      adj   = -2'sd1;
    end
  end

endmodule
