// tb_dlf_aligner: every 10-bit significand at every shift 0..34; the
// expected window and sticky bit are computed with 64-bit integer
// arithmetic.
module tb_dlf_aligner;
  logic [9:0]  sig;
  logic [5:0]  shift;
  logic [33:0] aligned;
  logic        sticky;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  dlf_aligner dut (.*);

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 1024; s++)
      for (int d = 0; d <= 34; d++) begin
        longint unsigned v, ev, lost;
        sig = 10'(s); shift = 6'(d); #1;
        v    = longint'(s) << 24;
        ev   = v >> d;
        lost = v & ((64'd1 << d) - 1);
        checks++;
        if (aligned !== 34'(ev) || sticky !== (lost != 0)) begin
          failures++;
          if (failures < 10) $display("FAIL sig=%h d=%0d got %h %0d", s, d, aligned, sticky);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
