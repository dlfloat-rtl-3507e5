// tb_dlf_lza: random and near-cancelling 35-bit operand pairs, both
// carry-in values. The anticipated count must place the true leading one of
// |a + b + cin| at bit 34, 33 or 32 of a 35-bit left-shifted copy (the
// window the normalizer corrects), and must be exact or one short in at
// least some cases of each sign (a sanity check on the error statistics).
module tb_dlf_lza;
  logic [34:0] a, b;
  logic [5:0]  lz;
  int checks = 0, failures = 0;
  int exact = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  dlf_lza #(.W(34)) dut (.*);

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200000; n++) begin
      longint sa, sb, s, m;
      int tl;
      logic [35:0] sh;
      sa = longint'({$urandom, $urandom}) >>> (30 + $urandom % 20);
      sb = (n % 2 == 0) ? -sa + longint'($urandom % 4096) - 2048
                        : longint'({$urandom, $urandom}) >>> (30 + $urandom % 20);
      s = sa + sb + longint'(n % 4 == 1);
      if (s >= (64'sd1 <<< 34) || s <= -(64'sd1 <<< 34) || s == 0) continue;
      m = (s < 0) ? -s : s;
      a = 35'(sa); b = 35'(sb); #1;
      tl = 0;
      for (int i = 0; i < 34; i++) if (m[i]) tl = i;
      if (tl + int'(lz) == 33) exact++;
      sh = 36'(m) << lz;
      checks++;
      if (sh[35] || sh[34:32] == 3'b000) begin
        failures++;
        if (failures < 10) $display("FAIL %0d + %0d: lz=%0d true lead %0d", sa, sb, lz, tl);
      end
    end
    checks++;
    if (exact < checks / 4) begin
      failures++;
      $display("FAIL: only %0d exact predictions", exact);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
