// tb_dlf_round_pack: all significands and guard values over exponents
// -3..66 plus the zero and NaN-infinity inputs. Expected values: the
// rounded magnitude (sig + guard) is renormalized and then range-checked
// against the DLFloat16 limits, smallest 2^-31*(1+2^-9), largest
// 2^33 - 2 ulp.
module tb_dlf_round_pack;
  import dlf_pkg::*;
  logic        sign, guard, zero_in, naninf_in, naninf;
  xexp_t       rexp;
  logic [9:0]  sig;
  logic [15:0] r;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  dlf_round_pack dut (.*);

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_r(logic [15:0] er, logic ef);
    checks++;
    if (r !== er || naninf !== ef) begin
      failures++;
      if (failures < 10) $display("FAIL s=%0d e=%0d sig=%h g=%0d z=%0d n=%0d: %h %0d exp %h %0d",
                                  sign, rexp, sig, guard, zero_in, naninf_in, r, naninf, er, ef);
    end
  endtask

  initial begin
    for (int e = -3; e <= 66; e++)
      for (int m = 512; m < 1024; m++)
        for (int g = 0; g < 2; g++) begin
          int mm, ee;
          sign = 1'($urandom); rexp = xexp_t'(e); sig = 10'(m); guard = 1'(g);
          zero_in = 0; naninf_in = 0; #1;
          mm = m + g; ee = e;
          if (mm == 1024) begin mm = 512; ee = e + 1; end
          // value = 2^(ee-31) * mm/512
          if (ee > 63 || (ee == 63 && mm == 1023)) expect_r(16'h7FFF, 1);
          else if (ee < 0 || (ee == 0 && mm == 512)) expect_r(16'h0000, 0);
          else expect_r({sign, 6'(ee), 9'(mm - 512)}, 0);
        end
    sign = 1; rexp = 10; sig = 10'h3FF; guard = 1;
    zero_in = 1; naninf_in = 0; #1; expect_r(16'h0000, 0);
    zero_in = 0; naninf_in = 1; #1; expect_r(16'h7FFF, 1);
    zero_in = 1; naninf_in = 1; #1; expect_r(16'h7FFF, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
