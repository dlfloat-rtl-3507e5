// tb_dlf_unpack: exhaustive check of the operand unpack for every 16-bit
// DLFloat16 pattern and every 8-bit FP8 pattern, against the field
// definitions of both formats (zero, NaN-infinity, hidden bit, FP8
// exponent rebias by +16).
module tb_dlf_unpack;
  import dlf_pkg::*;
  import dlf_ref_pkg::*;
  logic [15:0] x;
  logic        fp8;
  unpacked_t   u;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  dlf_unpack dut (.x(x), .fp8(fp8), .u(u));

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(ref_op_t o, int e_biased);
    checks++;
    if (u.zero !== o.zero || u.naninf !== o.naninf || u.sign !== o.sign ||
        (!o.zero && (u.sig !== 10'(o.m) || int'(u.exp) !== e_biased)) ||
        (o.zero && u.sig !== '0)) begin
      failures++;
      if (failures < 10) $display("FAIL x=%h fp8=%0d u=%p", x, fp8, u);
    end
  endtask

  initial begin
    for (int i = 0; i < 65536; i++) begin
      x = 16'(i); fp8 = 0; #1;
      check(decode16(x), decode16(x).e + 31);
    end
    for (int i = 0; i < 65536; i++) begin
      x = 16'(i); fp8 = 1; #1;        // upper byte must be ignored
      check(decode8(x[7:0]), decode8(x[7:0]).e + 31);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
