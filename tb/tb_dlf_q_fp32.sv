// tb_dlf_q_fp32: FP32 -> DLFloat16 quantizer. Directed values (1.0, exact
// ties, largest and smallest DLFloat16, overflow, underflow, infinities,
// NaN, FP32 zero and subnormal) and random FP32 values, checked against the
// exact-then-round reference.
module tb_dlf_q_fp32;
  import dlf_ref_pkg::*;
  logic [31:0] x;
  logic [15:0] r;
  logic        naninf;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  dlf_q_fp32 dut (.*);

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [31:0] v);
    bit [16:0] e;
    x = v; #1;
    e = ref_q(v);
    checks++;
    if ({naninf, r} !== e) begin
      failures++;
      if (failures < 10) $display("FAIL x=%h got %h/%0d exp %h/%0d", v, r, naninf, e[15:0], e[16]);
    end
  endtask

  initial begin
    chk(32'h3F800000);  // 1.0
    chk(32'h3F802000);  // 1 + 2^-10: tie, rounds up
    chk(32'h3F801FFF);  // just below tie
    chk(32'hBF802000);  // negative tie
    chk(32'h5FFF0000);  // near 2^65? (overflow)
    chk(32'h4FFF0000);  // 2^32 * 1.99: around largest
    chk(32'h4FFF8000);
    chk(32'h30000000);  // 2^-31: not representable, flushes
    chk(32'h30004000);  // 2^-31 * (1+2^-9): smallest
    chk(32'h7F800000);  // +inf
    chk(32'hFF800000);  // -inf
    chk(32'h7FC00000);  // NaN
    chk(32'h00000000);
    chk(32'h80000000);
    chk(32'h00000123);  // subnormal
    for (int n = 0; n < 100000; n++) begin
      logic [31:0] v;
      v = $urandom;
      if (n % 2) v[30:23] = 8'(127 - 40 + $urandom % 80);
      chk(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
