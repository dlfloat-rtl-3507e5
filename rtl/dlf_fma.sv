// dlf_fma: three-stage pipelined DLFloat16 fused multiply-add, R = C + A*B.
//
// All operands and the result are DLFloat16 (1-6-9, bias 31, no subnormals,
// unsigned zero, one merged NaN-infinity symbol). With fp8_mode = 1, A and B
// are instead 8-bit operands (1-5-2) in a[7:0] and b[7:0]; C and R stay
// 16-bit. The result is computed as if exactly and then rounded once,
// round-nearest-up (increment on the guard bit alone).
//
// Datapath, following the FMA block diagram:
//   stage 1  unpack A, B, C; exponent / shift-amount logic; aligner shifts C
//            into a 34-bit window (hidden bit at 33, sticky for what falls
//            off); radix-4 Booth multiplier (6 terms, three 3:2 CSA levels)
//            leaves A*B in carry-save form at window bits [21:2].
//   stage 2  one 3:2 CSA row merges C (inverted for effective subtraction)
//            with the product pair; the end adder gives |sum| and its sign;
//            the LZA predicts the normalization shift from the same inputs.
//   stage 3  normalizer (shift + 1-bit correction), result exponent,
//            round and pack.
// Any NaN-infinity input gives NaN-infinity and raises 'naninf'; so does
// overflow. Tiny results flush to zero.
//
// Timing: one operation per cycle; r/naninf/out_valid appear 3 clock
// cycles after the cycle in which in_valid was 1. No stall. The number of
// stages and where they split the datapath are this design's choice; the
// document says only that the unit is fully pipelined.
module dlf_fma
  import dlf_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        fp8_mode,
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic [15:0] c,
  output logic        out_valid,
  output logic [15:0] r,
  output logic        naninf
);

  localparam int LZ_W = $clog2(WIN_W);
  localparam int PP_W = WIN_W + 1 - PROD_LSB;   // 33

  typedef struct packed {
    logic [PP_W-1:0]  ps;
    logic [PP_W-1:0]  pc;
    logic [WIN_W-1:0] caln;
    logic             sticky;
    logic             esub;
    logic             sp;
    logic             sc;
    xexp_t            wexp;
    logic             naninf;
  } s1_t;

  typedef struct packed {
    logic [WIN_W-1:0] mag;
    logic [LZ_W-1:0]  lz;
    logic             sign;
    xexp_t            wexp;
    logic             naninf;
  } s2_t;

  typedef struct packed {
    logic [15:0] r;
    logic        naninf;
  } s3_t;

  // ---------------- stage 1: unpack, exponents, align, multiply
  unpacked_t ua, ub, uc;
  dlf_unpack u_unp_a (.x(a), .fp8(fp8_mode), .u(ua));
  dlf_unpack u_unp_b (.x(b), .fp8(fp8_mode), .u(ub));
  dlf_unpack u_unp_c (.x(c), .fp8(1'b0),     .u(uc));

  logic [5:0] shift;
  xexp_t      wexp1;
  dlf_exp_shift u_exp_shift (
    .ea(ua.exp), .eb(ub.exp), .ec(uc.exp),
    .prod_zero(ua.zero | ub.zero), .c_zero(uc.zero),
    .shift(shift), .wexp(wexp1)
  );

  logic [WIN_W-1:0] caln1;
  logic             sticky1;
  dlf_aligner u_aligner (.sig(uc.sig), .shift(shift), .aligned(caln1), .sticky(sticky1));

  logic [PP_W-1:0] ps1, pc1;
  dlf_booth_mult #(.N(SIG_W), .OUT_W(PP_W)) u_mult (.x(ua.sig), .y(ub.sig), .sum(ps1), .carry(pc1));

  s1_t s1_d, s1_q;
  logic v1;
  always_comb begin
    s1_d.ps     = ps1;
    s1_d.pc     = pc1;
    s1_d.caln   = caln1;
    s1_d.sticky = sticky1;
    s1_d.sp     = ua.sign ^ ub.sign;
    s1_d.sc     = uc.sign;
    s1_d.esub   = ua.sign ^ ub.sign ^ uc.sign;
    s1_d.wexp   = wexp1;
    s1_d.naninf = ua.naninf | ub.naninf | uc.naninf;
  end
  dlf_stage #(.W($bits(s1_t))) u_stage1 (
    .clk, .rst_n, .valid_in(in_valid), .d(s1_d), .valid_out(v1), .q(s1_q)
  );

  // ---------------- stage 2: 3:2 merge, add, LZA
  logic [WIN_W:0] cv, csa_s, csa_c;
  assign cv = s1_q.esub ? ~{1'b0, s1_q.caln} : {1'b0, s1_q.caln};
  dlf_csa32 #(.W(WIN_W + 1)) u_csa (
    .a({s1_q.ps, {PROD_LSB{1'b0}}}), .b({s1_q.pc, {PROD_LSB{1'b0}}}), .c(cv),
    .sum(csa_s), .carry(csa_c)
  );

  logic [WIN_W-1:0] mag2;
  logic             neg2;
  dlf_adder #(.W(WIN_W)) u_adder (
    .a(csa_s), .b(csa_c), .cin(s1_q.esub & ~s1_q.sticky), .mag(mag2), .neg(neg2)
  );

  logic [LZ_W-1:0] lz2;
  dlf_lza #(.W(WIN_W)) u_lza (.a(csa_s), .b(csa_c), .lz(lz2));

  s2_t s2_d, s2_q;
  logic v2;
  always_comb begin
    s2_d.mag    = mag2;
    s2_d.lz     = lz2;
    s2_d.sign   = neg2 ? s1_q.sc : s1_q.sp;
    s2_d.wexp   = s1_q.wexp;
    s2_d.naninf = s1_q.naninf;
  end
  dlf_stage #(.W($bits(s2_t))) u_stage2 (
    .clk, .rst_n, .valid_in(v1), .d(s2_d), .valid_out(v2), .q(s2_q)
  );

  // ---------------- stage 3: normalize, exponent, round and pack
  logic [SIG_W-1:0]  nsig;
  logic              nguard, nzero;
  logic signed [1:0] nadj;
  dlf_normalizer u_norm (
    .mag(s2_q.mag), .lz(s2_q.lz), .sig(nsig), .guard(nguard), .adj(nadj), .zero(nzero)
  );

  xexp_t rexp;
  dlf_exp_adjust u_exp (.wexp(s2_q.wexp), .lz(s2_q.lz), .adj(nadj), .rexp(rexp));

  s3_t s3_d, s3_q;
  dlf_round_pack u_round (
    .sign(s2_q.sign), .rexp(rexp), .sig(nsig), .guard(nguard),
    .zero_in(nzero), .naninf_in(s2_q.naninf), .r(s3_d.r), .naninf(s3_d.naninf)
  );
  dlf_stage #(.W($bits(s3_t))) u_stage3 (
    .clk, .rst_n, .valid_in(v2), .d(s3_d), .valid_out(out_valid), .q(s3_q)
  );

  // The LZA plus the one-position correction must always leave a
  // normalized significand.
  a_normalized: assert property (@(posedge clk) disable iff (!rst_n)
    v2 && !nzero |-> nsig[SIG_W-1]);

  assign r      = s3_q.r;
  assign naninf = s3_q.naninf;

endmodule
