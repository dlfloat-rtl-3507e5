// tb_dlf_csa32: random 34-bit operands; the sum must be the bitwise XOR
// and sum + carry must equal a + b + c modulo 2^34.
module tb_dlf_csa32;
  logic [33:0] a, b, c, sum, carry;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  dlf_csa32 #(.W(34)) dut (.*);

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 100000; n++) begin
      longint unsigned ta, tb_, tc;
      ta = {$urandom, $urandom}; tb_ = {$urandom, $urandom}; tc = {$urandom, $urandom};
      a = 34'(ta); b = 34'(tb_); c = 34'(tc); #1;
      checks++;
      if (34'(sum + carry) !== 34'(ta + tb_ + tc) || sum !== (a ^ b ^ c)) begin
        failures++;
        if (failures < 10) $display("FAIL %h %h %h", a, b, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
