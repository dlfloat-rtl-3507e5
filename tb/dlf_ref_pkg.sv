// dlf_ref_pkg: bit-exact reference model of DLFloat16 arithmetic for the
// testbenches, written independently of the RTL datapath.
//
// Operands are decoded into an integer significand M and an exponent; the
// exact value of C + A*B is formed as a 192-bit fixed-point integer with
// weight 2^-100 per LSB (wide enough for every product and addend), and
// that exact value is rounded once: the top 10 bits are kept and the next
// bit (guard) decides increment (round-nearest-up). Zero, NaN-infinity,
// overflow (to NaN-infinity) and underflow (to zero) follow the format
// rules the RTL implements.
package dlf_ref_pkg;

  localparam int FXW = 192;
  localparam int FXB = 100;   // fixed-point LSB weight 2^-FXB

  typedef struct {
    bit zero;
    bit naninf;
    bit sign;
    int unsigned m;   // significand with hidden bit, 10 bits
    int e;            // unbiased exponent of the hidden bit
  } ref_op_t;

  function automatic ref_op_t decode16(bit [15:0] x);
    ref_op_t o;
    o.sign   = x[15];
    o.zero   = (x[14:9] == 0) && (x[8:0] == 0);
    o.naninf = (x[14:9] == 63) && (x[8:0] == 511);
    o.m      = 512 + x[8:0];
    o.e      = int'(x[14:9]) - 31;
    return o;
  endfunction

  function automatic ref_op_t decode8(bit [7:0] x);
    ref_op_t o;
    o.sign   = x[7];
    o.zero   = (x[6:2] == 0) && (x[1:0] == 0);
    o.naninf = (x[6:2] == 31) && (x[1:0] == 3);
    o.m      = 512 + 128 * x[1:0];
    o.e      = int'(x[6:2]) - 15;
    return o;
  endfunction

  // Round an exact fixed-point magnitude (weight 2^-FXB) to DLFloat16.
  // Returns {naninf_flag, result}.
  function automatic bit [16:0] round_fx(bit sign, bit [FXW-1:0] mag);
    int lead, er;
    bit [FXW-1:0] t;
    int unsigned mant, g;
    if (mag == 0) return 17'h0_0000;
    lead = 0;
    for (int i = 0; i < FXW; i++) if (mag[i]) lead = i;
    t    = mag >> (lead - 9);
    mant = t[9:0];
    g    = (lead >= 10) ? mag[lead-10] : 0;
    er   = lead - FXB + 31;
    mant = mant + g;
    if (mant == 1024) begin mant = 512; er++; end
    if (er > 63 || (er == 63 && mant == 1023)) return {1'b1, 16'h7FFF};
    if (er < 0 || (er == 0 && mant == 512)) return 17'h0_0000;
    return {1'b0, sign, 6'(er), 9'(mant - 512)};
  endfunction

  // Exact C + A*B, rounded once. fp8 selects 8-bit A and B (low bytes).
  function automatic bit [16:0] ref_fma(bit [15:0] a, bit [15:0] b, bit [15:0] c, bit fp8);
    ref_op_t oa, ob, oc;
    bit [FXW-1:0] p, q, mag;
    bit sp, s;
    oa = fp8 ? decode8(a[7:0]) : decode16(a);
    ob = fp8 ? decode8(b[7:0]) : decode16(b);
    oc = decode16(c);
    if (oa.naninf || ob.naninf || oc.naninf) return {1'b1, 16'h7FFF};
    p  = 0;
    q  = 0;
    sp = oa.sign ^ ob.sign;
    if (!oa.zero && !ob.zero)
      p = FXW'(oa.m * ob.m) << (oa.e + ob.e - 18 + FXB);
    if (!oc.zero)
      q = FXW'(oc.m) << (oc.e - 9 + FXB);
    if (sp == oc.sign) begin
      mag = p + q; s = sp;
    end else if (p >= q) begin
      mag = p - q; s = sp;
    end else begin
      mag = q - p; s = oc.sign;
    end
    return round_fx(s, mag);
  endfunction

  // FP32 -> DLFloat16, round-nearest-up on the exact FP32 value.
  function automatic bit [16:0] ref_q(bit [31:0] x);
    bit [FXW-1:0] mag;
    int e;
    if (x[30:23] == 8'hFF) return {1'b1, 16'h7FFF};
    if (x[30:23] == 8'h00) return 17'h0_0000;
    e = int'(x[30:23]) - 127;
    if (e < -40) return 17'h0_0000;           // far below 2^-31
    if (e > 40)  return {1'b1, 16'h7FFF};     // far above 2^33
    // 24-bit significand, LSB weight 2^(e-23)
    mag = FXW'({1'b1, x[22:0]}) << (e - 23 + FXB);
    return round_fx(x[31], mag);
  endfunction

  // Value of a DLFloat16 as a real (for printing and for sanity checks).
  function automatic real to_real(bit [15:0] x);
    ref_op_t o = decode16(x);
    if (o.zero) return 0.0;
    return (o.sign ? -1.0 : 1.0) * real'(o.m) / 512.0 * (2.0 ** o.e);
  endfunction

endpackage
