// tb_dlf_stage: random valid pattern and data; checks that valid_out is
// valid_in delayed by one cycle, that the payload is loaded only on valid
// cycles and held otherwise, and that reset clears both.
module tb_dlf_stage;
  logic        clk = 0;
  logic        rst_n, valid_in, valid_out;
  logic [15:0] d, q;
  logic [15:0] model_q;
  logic        model_v;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  dlf_stage #(.W(16)) dut (.*);

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; valid_in = 1; d = 16'hFFFF;
    @(posedge clk); #1;
    checks++;
    if (valid_out !== 0 || q !== 0) failures++;
    model_q = 0; model_v = 0;
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      valid_in = 1'($urandom); d = 16'($urandom);
      @(posedge clk);
      model_v = valid_in;
      if (valid_in) model_q = d;
      #1;
      checks++;
      if (valid_out !== model_v || q !== model_q) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d v=%0d q=%h exp %0d %h", n, valid_out, q, model_v, model_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
