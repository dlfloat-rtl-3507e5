// tb_dlfloat_top: end-to-end test of the DLFloat16 top level at its default
// configuration.
//
// The FMA port gets directed and random operations (FP16 and FP8 operand
// modes, with bursts of back-to-back issue and idle gaps); the quantizer
// port gets random FP32 values. Every result is compared with the
// exact-then-round reference, the FMA latency must be exactly 3 cycles and a
// burst must deliver one result per cycle. The test also counts how often
// each datapath mechanism occurred and fails if one never did: effective
// subtraction, negative sum (abs difference), aligner sticky borrow, addend
// far above the product (shift clamped at 0), addend shifted fully out,
// LZA exact / one short (normalizer correction 0 and -1; the +1 case
// needs a negative sum with carry-in 0, which the FMA never produces, and
// is covered by the normalizer's own test),
// round-up, round-up carrying into the exponent, overflow to NaN-infinity,
// NaN-infinity operand, flush to zero, exact cancellation, FP8 mode,
// quantizer rounding and quantizer overflow.
module tb_dlfloat_top;
  import dlf_ref_pkg::*;

  localparam int LAT   = 3;
  localparam int NRAND = 60000;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        fma_in_valid, fma_fp8_mode;
  logic [15:0] fma_a, fma_b, fma_c;
  logic        fma_out_valid;
  logic [15:0] fma_r;
  logic        fma_naninf;
  logic        q_in_valid;
  logic [31:0] q_x;
  logic        q_out_valid;
  logic [15:0] q_r;
  logic        q_naninf;

  int checks = 0, failures = 0;
  longint cyc = 0;

  dlfloat_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { bit [16:0] exp; longint t_in; } item_t;
  item_t fq[$];
  bit [16:0] qq[$];

  // ---------------- mechanism counters
  typedef enum int {
    M_ESUB, M_NEG, M_STICKY, M_CTOP, M_COUT, M_LZA0, M_LZAM1,
    M_RUP, M_RCARRY, M_OVF, M_NANIN, M_FLUSH, M_CANCEL, M_FP8, M_QRUP, M_QOVF,
    M_BURST, M_NUM
  } mech_e;
  int    mcount [M_NUM];
  string mname  [M_NUM] = '{"effective subtraction", "negative sum", "sticky borrow",
                            "addend above product", "addend shifted out", "LZA exact",
                            "LZA one short", "round up", "round carry",
                            "overflow", "NaN-inf operand", "flush to zero", "exact cancellation",
                            "FP8 mode", "quantizer round up", "quantizer overflow",
                            "back-to-back burst"};
  int burst_len = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_fma.v1) begin
      if (dut.u_fma.s1_q.esub) mcount[M_ESUB]++;
      if (dut.u_fma.s1_q.esub && dut.u_fma.s1_q.sticky) mcount[M_STICKY]++;
      if (dut.u_fma.u_adder.neg) mcount[M_NEG]++;
    end
    if (fma_in_valid) begin
      if (dut.u_fma.u_exp_shift.d_raw < 0 && !dut.u_fma.ua.zero && !dut.u_fma.ub.zero &&
          !dut.u_fma.uc.zero) mcount[M_CTOP]++;
      if (dut.u_fma.u_exp_shift.d_raw >= 34 && !dut.u_fma.uc.zero) mcount[M_COUT]++;
      if (fma_fp8_mode) mcount[M_FP8]++;
    end
    if (dut.u_fma.v2 && !dut.u_fma.nzero && !dut.u_fma.s2_q.naninf) begin
      if (dut.u_fma.nadj == 2'sd0)  mcount[M_LZA0]++;
      if (dut.u_fma.nadj == -2'sd1) mcount[M_LZAM1]++;
      if (dut.u_fma.nguard) mcount[M_RUP]++;
      if (dut.u_fma.u_round.rnd[10]) mcount[M_RCARRY]++;
      if (dut.u_fma.s3_d.naninf) mcount[M_OVF]++;
      if (dut.u_fma.s3_d.r == 16'h0000) mcount[M_FLUSH]++;
    end
    if (dut.u_fma.v2 && dut.u_fma.s2_q.naninf) mcount[M_NANIN]++;
    if (dut.u_fma.v2 && dut.u_fma.nzero && !dut.u_fma.s2_q.naninf) mcount[M_CANCEL]++;
    if (q_in_valid && !dut.q_naninf_d && q_x[30:23] != 8'hFF && q_x[13]) mcount[M_QRUP]++;
    if (q_in_valid && dut.q_naninf_d && q_x[30:23] != 8'hFF) mcount[M_QOVF]++;
    // a burst: results on 16 consecutive cycles
    burst_len = fma_out_valid ? burst_len + 1 : 0;
    if (burst_len == 16) mcount[M_BURST]++;
  end

  // ---------------- watchdog
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- checkers
  always @(posedge clk) if (rst_n) begin
    if (fma_out_valid) begin
      item_t it;
      checks++;
      if (fq.size() == 0) begin
        failures++;
        $display("FAIL: unexpected FMA result");
      end else begin
        it = fq.pop_front();
        if ({fma_naninf, fma_r} !== it.exp || cyc - it.t_in != LAT) begin
          failures++;
          if (failures < 20) $display("FAIL: FMA got %h/%0d exp %h/%0d latency %0d",
                                      fma_r, fma_naninf, it.exp[15:0], it.exp[16], cyc - it.t_in);
        end
      end
    end
    if (q_out_valid) begin
      bit [16:0] e;
      checks++;
      e = (qq.size() != 0) ? qq.pop_front() : 17'h1_FFFF;
      if ({q_naninf, q_r} !== e) begin
        failures++;
        if (failures < 20) $display("FAIL: Q got %h/%0d exp %h/%0d", q_r, q_naninf, e[15:0], e[16]);
      end
    end
  end

  task automatic issue(bit [15:0] ta, bit [15:0] tb_, bit [15:0] tc, bit f8);
    item_t it;
    bit [31:0] v;
    fma_a <= ta; fma_b <= tb_; fma_c <= tc; fma_fp8_mode <= f8; fma_in_valid <= 1'b1;
    it.exp = ref_fma(ta, tb_, tc, f8);
    it.t_in = cyc + 1;
    fq.push_back(it);
    // the quantizer runs alongside on most cycles
    if ($urandom % 4 != 0) begin
      v = $urandom;
      if ($urandom % 2) v[30:23] = 8'(127 - 36 + $urandom % 72);
      q_x <= v; q_in_valid <= 1'b1;
      qq.push_back(ref_q(v));
    end else begin
      q_in_valid <= 1'b0;
    end
    @(posedge clk);
  endtask

  task automatic idle();
    fma_in_valid <= 1'b0;
    q_in_valid   <= 1'b0;
    @(posedge clk);
  endtask

  function automatic bit [15:0] rnd16(int unsigned spread);
    int unsigned e;
    e = 31 + ($urandom % (2 * spread + 1)) - spread;
    if (e > 63) e = 63;
    return {1'($urandom), 6'(e), 9'($urandom)};
  endfunction

  initial begin
    bit [15:0] ta, tb_, tc;
    bit [16:0] pr;
    rst_n = 1'b0; fma_in_valid = 1'b0; fma_fp8_mode = 1'b0;
    fma_a = '0; fma_b = '0; fma_c = '0; q_in_valid = 1'b0; q_x = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    issue(16'h3E00, 16'h4000, 16'h3E00, 0);   // 1*2 + 1 = 3
    issue(16'h3E00, 16'h3E00, 16'hBE00, 0);   // exact cancellation
    issue(16'h7FFF, 16'h3E00, 16'h3E00, 0);   // NaN-inf operand
    issue(16'h7F00, 16'h7F00, 16'h0000, 0);   // overflow
    issue(16'h0001, 16'h0001, 16'h0000, 0);   // flush to zero
    issue(16'h3FFF, 16'h3FFF, 16'h0000, 0);   // round carry
    issue(16'h3E00, 16'h3E00, 16'hE000, 0);   // addend far above
    issue(16'h4000, 16'h4000, 16'h8400, 0);   // addend far below, subtract
    idle();
    for (int n = 0; n < NRAND; n++) begin
      case (n % 4)
        0: begin
          ta = rnd16(8); tb_ = rnd16(8);
          pr = ref_fma(ta, tb_, 16'h0000, 0);
          tc = pr[15:0] ^ 16'h8000;
          tc[3:0] = 4'($urandom);
          issue(ta, tb_, tc, 0);
        end
        1: issue(rnd16(6), rnd16(6), rnd16(24), 0);
        2: issue(16'($urandom), 16'($urandom), 16'($urandom), 0);
        default: issue(16'($urandom), 16'($urandom), rnd16(10), 1);
      endcase
      if ($urandom % 64 == 0) idle();
    end
    idle();
    repeat (LAT + 2) @(posedge clk);

    checks++;
    if (fq.size() != 0 || qq.size() != 0) begin
      failures++;
      $display("FAIL: results missing");
    end
    for (int m = 0; m < M_NUM; m++) begin
      $display("  %-22s %0d", mname[m], mcount[m]);
      checks++;
      if (mcount[m] == 0) begin
        failures++;
        $display("FAIL: mechanism '%s' never happened", mname[m]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
