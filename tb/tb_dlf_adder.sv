// tb_dlf_adder: random signed 35-bit operand pairs (kept within range) with
// both carry-ins; magnitude and sign are checked against 64-bit signed
// arithmetic.
module tb_dlf_adder;
  logic [34:0] a, b;
  logic        cin;
  logic [33:0] mag;
  logic        neg;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  dlf_adder #(.W(34)) dut (.*);

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200000; n++) begin
      longint sa, sb, s;
      sa = longint'({$urandom, $urandom}) >>> (30 + $urandom % 20);
      sb = (n % 3 == 0) ? -sa + longint'($urandom % 64) - 32
                        : longint'({$urandom, $urandom}) >>> (30 + $urandom % 20);
      cin = 1'($urandom);
      s = sa + sb + longint'(cin);
      if (s >= (64'sd1 <<< 34) || s <= -(64'sd1 <<< 34)) continue;
      a = 35'(sa); b = 35'(sb); #1;
      checks++;
      if (neg !== (s < 0) || mag !== 34'((s < 0) ? -s : s)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d + %0d + %0d: %0d %0d", sa, sb, cin, neg, mag);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
