// tb_dlf_exp_shift: checks the shift amount and window exponent for all
// 64^3 exponent combinations and the zero-operand cases. The expected values
// come from the window geometry: product weight-1 bit at window bit 20,
// addend hidden bit at bit 33 before shifting, shift clamped to 0..34.
module tb_dlf_exp_shift;
  import dlf_pkg::*;
  logic [5:0] ea, eb, ec, shift;
  logic       prod_zero, c_zero;
  xexp_t      wexp;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  dlf_exp_shift dut (.*);

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++)
        for (int k = 0; k < 64; k++)
          for (int z = 0; z < 3; z++) begin
            int ep, ecu, hidden_pos, exp_shift, exp_w;
            ea = 6'(i); eb = 6'(j); ec = 6'(k);
            prod_zero = (z == 1); c_zero = (z == 2);
            #1;
            ep  = (i - 31) + (j - 31);      // unbiased product exponent
            ecu = k - 31;
            // position of C's hidden bit if the product's 2^0 is at bit 20
            hidden_pos = 20 + (ecu - ep);
            if (z == 1 || (z == 0 && hidden_pos >= 33)) begin
              exp_shift = 0; exp_w = k;     // C on top
            end else begin
              // zero addend: shifted out entirely
              exp_shift = (z == 2) ? 34 : ((33 - hidden_pos > 34) ? 34 : 33 - hidden_pos);
              exp_w = ep + 13 + 31;         // window bit 33 = product 2^13
            end
            checks++;
            if (int'(shift) != exp_shift || int'(wexp) != exp_w) begin
              failures++;
              if (failures < 10) $display("FAIL %0d %0d %0d z%0d: %0d %0d", i, j, k, z, shift, wexp);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
