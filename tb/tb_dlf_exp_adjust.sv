// tb_dlf_exp_adjust: every shift count and correction over a range of window
// exponents, against integer arithmetic.
module tb_dlf_exp_adjust;
  import dlf_pkg::*;
  xexp_t             wexp, rexp;
  logic [5:0]        lz;
  logic signed [1:0] adj;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  dlf_exp_adjust dut (.*);

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = -18; w <= 108; w++)
      for (int l = 0; l < 34; l++)
        for (int j = -1; j <= 1; j++) begin
          wexp = xexp_t'(w); lz = 6'(l); adj = 2'(j); #1;
          checks++;
          if (int'(rexp) != w - l + j) begin
            failures++;
            if (failures < 10) $display("FAIL %0d %0d %0d -> %0d", w, l, j, rexp);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
