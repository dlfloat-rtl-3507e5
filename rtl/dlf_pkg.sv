// dlf_pkg: formats, constants and shared types of the DLFloat16 FMA unit.
//
// DLFloat16 is a 16-bit floating-point format: 1 sign bit, 6 exponent bits
// (bias 31) and 9 fraction bits, value (-1)^s * 2^(e-31) * (1 + f/512).
// There are no subnormals: exponent 0 with a non-zero fraction is an
// ordinary normal number 2^-31 * 1.f, and only exponent 0 with fraction 0
// is zero, which is unsigned. Infinity and NaN are merged into a single
// unsigned symbol, exponent 63 with fraction 511 ("NaN-infinity"), so the
// top binade is otherwise usable and the largest number is 2^33 - 2 ulp.
//
// The 8-bit operand format used by the FP8 FMA instruction has 1 sign,
// 5 exponent and 2 fraction bits. Its bias (15) and its use of the same
// zero / NaN-infinity conventions are this design's choice.
//
// The adder window of the FMA is 34 bits wide (WIN_W); the addend
// significand enters it at the top and the product sits at bits [21:2].
package dlf_pkg;

  localparam int EXP_W   = 6;
  localparam int FRAC_W  = 9;
  localparam int SIG_W   = FRAC_W + 1;         // significand with hidden bit
  localparam int BIAS    = 31;
  localparam int EXP_MAX = (1 << EXP_W) - 1;   // 63

  localparam int FP8_EXP_W  = 5;
  localparam int FP8_FRAC_W = 2;
  localparam int FP8_BIAS   = 15;

  localparam int WIN_W   = 34;                 // adder / LZA width
  localparam int PROD_LSB = 2;                 // product LSB position in window
  // Distance from the product's weight-1 bit (window bit 20) to the window
  // MSB (bit 33): 13.
  localparam int ALIGN_OFS = (WIN_W - 1) - (PROD_LSB + 2 * FRAC_W);
  // Biased exponent of window bit 33 when the product sets the scale:
  // (Ea - 31) + (Eb - 31) + 13 + 31 = Ea + Eb - 18. The aligner shift is
  // this value minus Ec.
  localparam int PEXP_OFS  = BIAS - ALIGN_OFS;

  // Signed exponent wide enough for every intermediate result exponent.
  localparam int XEXP_W = 10;
  typedef logic signed [XEXP_W-1:0] xexp_t;

  localparam logic [15:0] NANINF = 16'h7FFF;   // sign 0, exp 63, frac 511
  localparam logic [15:0] ZERO   = 16'h0000;

  // Unpacked operand.
  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;      // biased DLFloat16 exponent
    logic [SIG_W-1:0]  sig;      // hidden bit + fraction, 0 for zero
    logic              zero;
    logic              naninf;
  } unpacked_t;

endpackage
