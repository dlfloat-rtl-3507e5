// tb_dlf_normalizer: random 34-bit magnitudes with a shift count equal to
// the true leading-zero count or off by one either way; the 10-bit
// significand, guard bit, exponent correction and zero flag are checked
// against an independently normalized value.
module tb_dlf_normalizer;
  import dlf_pkg::*;
  logic [33:0]       mag;
  logic [5:0]        lz;
  logic [9:0]        sig;
  logic              guard, zero;
  logic signed [1:0] adj;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  dlf_normalizer dut (.*);

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200000; n++) begin
      longint unsigned m;
      int tl, tz, e;
      logic [63:0] nm;
      m  = {$urandom, $urandom} >> (30 + $urandom % 34);
      if (m == 0) m = 1;
      tl = 0;
      for (int i = 0; i < 34; i++) if (m[i]) tl = i;
      tz = 33 - tl;
      e  = int'($urandom % 3) - 1;
      if (tz + e < 0 || tz + e > 33) e = 0;
      mag = 34'(m); lz = 6'(tz + e); #1;
      nm = 64'(m) << (63 - tl);            // leading one at bit 63
      checks++;
      if (sig !== nm[63:54] || guard !== nm[53] || int'(adj) !== e || zero) begin
        failures++;
        if (failures < 10) $display("FAIL m=%h lz=%0d: %h %0d %0d", m, lz, sig, guard, adj);
      end
    end
    mag = '0; lz = 6'd5; #1;
    checks++;
    if (!zero) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
