// tb_dlf_fma: self-checking testbench of the pipelined DLFloat16 FMA.
//
// Drives one operation per cycle (with random idle cycles) and compares
// every result against the exact-then-round reference model. Checks that
// each result appears exactly 3 cycles after its input and that a
// back-to-back burst gives one result per cycle. Stimulus: directed special
// cases (zeros, NaN-infinity, overflow, underflow, exact cancellation,
// rounding ties), FP8-mode operations, and random operands biased towards
// close exponents and near-cancellation so that the aligner, the LZA and the
// normalizer correction are all exercised.
module tb_dlf_fma;
  import dlf_ref_pkg::*;

  localparam int LAT     = 3;
  localparam int NRAND   = 200000;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        in_valid;
  logic        fp8_mode;
  logic [15:0] a, b, c;
  logic        out_valid;
  logic [15:0] r;
  logic        naninf;

  int checks = 0, failures = 0;
  longint cyc = 0;

  dlf_fma dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { bit [16:0] exp; longint t_in; bit [15:0] a, b, c; bit fp8; } item_t;
  item_t q[$];

  // watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      item_t it;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected result %h", r);
      end else begin
        it = q.pop_front();
        if ({naninf, r} !== it.exp) begin
          failures++;
          if (failures < 20)
            $display("FAIL: a=%h b=%h c=%h fp8=%0d got %h/%0d exp %h/%0d", it.a, it.b, it.c,
                     it.fp8, r, naninf, it.exp[15:0], it.exp[16]);
        end
        checks++;
        if (cyc - it.t_in != LAT) begin
          failures++;
          $display("FAIL: latency %0d", cyc - it.t_in);
        end
      end
    end
  end

  task automatic issue(bit [15:0] ta, bit [15:0] tb_, bit [15:0] tc, bit f8);
    item_t it;
    a <= ta; b <= tb_; c <= tc; fp8_mode <= f8; in_valid <= 1'b1;
    it.exp = ref_fma(ta, tb_, tc, f8);
    it.t_in = cyc + 1;   // sampled at the coming edge
    it.a = ta; it.b = tb_; it.c = tc; it.fp8 = f8;
    q.push_back(it);
    @(posedge clk);
  endtask

  task automatic idle();
    in_valid <= 1'b0;
    @(posedge clk);
  endtask

  task automatic hand(bit [15:0] ta, bit [15:0] tb_, bit [15:0] tc, bit f8, bit [16:0] e);
    bit [16:0] m;
    m = ref_fma(ta, tb_, tc, f8);
    checks++;
    if (m !== e) begin
      failures++;
      $display("FAIL: reference gives %h for %h %h %h, expected %h", m, ta, tb_, tc, e);
    end
    issue(ta, tb_, tc, f8);
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
    rst_n = 1'b0; in_valid = 1'b0; fp8_mode = 1'b0; a = '0; b = '0; c = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // directed, with results worked out by hand (these also check the
    // reference model's reading of the format)
    hand(16'h3E00, 16'h4000, 16'h3E00, 0, 17'h0_4100);   // 1*2 + 1 = 3
    hand(16'h3E00, 16'h3E00, 16'hBE00, 0, 17'h0_0000);   // 1 - 1 = 0
    hand(16'h7FFF, 16'h3E00, 16'h3E00, 0, 17'h1_7FFF);   // NaN-inf input
    hand(16'h0000, 16'h7FFF, 16'h3E00, 0, 17'h1_7FFF);   // 0 * NaN-inf
    hand(16'h3E00, 16'h3E00, 16'hFFFF, 0, 17'h1_7FFF);   // signed NaN-inf addend
    hand(16'h0000, 16'h1234, 16'h5678, 0, 17'h0_5678);   // zero product: C
    hand(16'h8000, 16'h1234, 16'hD678, 0, 17'h0_D678);   // "negative" zero is zero
    hand(16'h7F00, 16'h7F00, 16'h0000, 0, 17'h1_7FFF);   // overflow
    hand(16'h7FFE, 16'h3E00, 16'h0000, 0, 17'h0_7FFE);   // largest number survives
    hand(16'h7FFE, 16'h3E00, 16'h6A00, 0, 17'h1_7FFF);   // largest + ulp/2 overflows
    hand(16'h0001, 16'h3E00, 16'h0000, 0, 17'h0_0001);   // smallest number survives
    hand(16'h0200, 16'h3C00, 16'h0000, 0, 17'h0_0000);   // 2^-30 * 0.5 = 2^-31: zero
    hand(16'h0001, 16'h0001, 16'h0000, 0, 17'h0_0000);   // underflow
    hand(16'h3E01, 16'h3E01, 16'h0000, 0, 17'h0_3E02);   // (1+2^-9)^2, guard 0
    hand(16'h3FFF, 16'h3FFF, 16'h0000, 0, 17'h0_41FE);   // (2-2^-9)^2
    hand(16'h3E00, 16'h3E00, 16'h2A00, 0, 17'h0_3E01);   // 1 + 2^-10: tie rounds up
    hand(16'hBE00, 16'h3E00, 16'hAA00, 0, 17'h0_BE01);   // -(1 + 2^-10): away from 0
    hand(16'h3E00, 16'h3E00, 16'hAA00, 0, 17'h0_3DFF);   // 1 - 2^-10 = 0.1111111111
    hand(16'h003C, 16'h0038, 16'h0000, 1, 17'h0_3C00);   // FP8 1.0 * 0.5
    hand(16'h00BC, 16'h003E, 16'h3E00, 1, 17'h0_BC00);   // FP8 -1.0*1.5 + 1 = -0.5
    hand(16'h00FF, 16'h003C, 16'h3E00, 1, 17'h1_7FFF);   // FP8 NaN-inf
    hand(16'h0000, 16'h003C, 16'h3E00, 1, 17'h0_3E00);   // FP8 zero
    for (int i = 0; i < 64; i++) issue(rnd16(3), rnd16(3), {1'b1, 6'(i), 9'($urandom)}, 0);

    // random: near-cancellation
    for (int i = 0; i < NRAND / 4; i++) begin
      ta = rnd16(8); tb_ = rnd16(8);
      pr = ref_fma(ta, tb_, 16'h0000, 0);
      tc = pr[15:0] ^ 16'h8000;
      tc[3:0] = 4'($urandom);
      if ($urandom % 4 == 0) tc[8:0] = 9'($urandom);
      issue(ta, tb_, tc, 0);
      if ($urandom % 8 == 0) idle();
    end
    // random: close exponents, both signs
    for (int i = 0; i < NRAND / 4; i++) issue(rnd16(6), rnd16(6), rnd16(20), 0);
    // random: full range
    for (int i = 0; i < NRAND / 4; i++)
      issue(16'($urandom), 16'($urandom), 16'($urandom), 0);
    // random: FP8 operands
    for (int i = 0; i < NRAND / 4; i++)
      issue(16'($urandom), 16'($urandom), ($urandom % 2) ? rnd16(10) : 16'($urandom), 1);

    idle();
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
