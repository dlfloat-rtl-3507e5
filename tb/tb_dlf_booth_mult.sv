// tb_dlf_booth_mult: exhaustive 10x10-bit check of the Booth multiplier:
// the two carry-save outputs must add (mod 2^33) to the exact product.
module tb_dlf_booth_mult;
  logic [9:0]  x, y;
  logic [32:0] sum, carry;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  dlf_booth_mult dut (.*);

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++)
      for (int j = 0; j < 1024; j++) begin
        logic [32:0] tot;
        x = 10'(i); y = 10'(j); #1;
        tot = sum + carry;
        checks++;
        if (tot !== 33'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d = %0d", i, j, tot);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
