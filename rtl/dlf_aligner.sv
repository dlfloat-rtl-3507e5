// dlf_aligner: addend aligner ("Aligner C") of the DLFloat16 FMA.
//
// Places the 10-bit addend significand at the top of the 34-bit adder
// window (bits [33:24]) and shifts it right by 0..34 positions. Bits that
// fall off the bottom are ORed into 'sticky'. The sticky bit is used only as
// a borrow in effective subtraction (the adder's carry-in), which keeps the
// truncated window result exactly equal to the floor of the true sum; the
// rounder itself needs no sticky. Combinational.
module dlf_aligner
  import dlf_pkg::*;
(
  input  logic [SIG_W-1:0] sig,
  input  logic [5:0]       shift,   // 0 .. WIN_W
  output logic [WIN_W-1:0] aligned,
  output logic             sticky
);

  logic [2*WIN_W-1:0] wide;

  always_comb begin
    wide    = {sig, {(2*WIN_W-SIG_W){1'b0}}} >> shift;
    aligned = wide[2*WIN_W-1 -: WIN_W];
    sticky  = |wide[WIN_W-1:0];
  end

endmodule
