// dlf_exp_shift: exponent and shift-amount logic of the DLFloat16 FMA.
//
// The adder window is 34 bits. The product A*B always sits at bits [21:2]
// (its weight-1 bit at bit 20); the addend C enters with its hidden bit at
// bit 33 and is shifted right by 'shift'. From the biased exponents:
//   d_raw = Ea + Eb - Ec - 18
// d_raw <= 0: C is at least 13 binades above the product. C stays at the
//   top (shift 0) and the window exponent is Ec. The product then lies
//   wholly below C's guard bit; with round-nearest-up rounding (guard bit
//   only) its exact position no longer changes the result, so it is left
//   where it is and no product sticky is needed.
// d_raw > 0: shift = min(d_raw, 34) and the window exponent (biased
//   exponent of bit 33) is Ea + Eb - 18.
// A zero product uses shift 0 and window exponent Ec; a zero addend is shifted
// fully out. Combinational. This partitioning is this design's choice; the
// block name and role follow the FMA block diagram.
module dlf_exp_shift
  import dlf_pkg::*;
(
  input  logic [EXP_W-1:0] ea,
  input  logic [EXP_W-1:0] eb,
  input  logic [EXP_W-1:0] ec,
  input  logic             prod_zero,
  input  logic             c_zero,
  output logic [5:0]       shift,     // 0 .. 34
  output xexp_t            wexp       // biased exponent of window bit 33
);

  xexp_t pexp, d_raw;

  always_comb begin
    pexp  = xexp_t'(ea) + xexp_t'(eb) - xexp_t'(PEXP_OFS);
    d_raw = pexp - xexp_t'(ec);
    if (prod_zero) begin
      shift = '0;
      wexp  = xexp_t'(ec);
    end else if (c_zero) begin
      shift = 6'(WIN_W);
      wexp  = pexp;
    end else if (d_raw <= 0) begin
      shift = '0;
      wexp  = xexp_t'(ec);
    end else begin
      shift = (d_raw > xexp_t'(WIN_W)) ? 6'(WIN_W) : 6'(d_raw);
      wexp  = pexp;
    end
  end

endmodule
