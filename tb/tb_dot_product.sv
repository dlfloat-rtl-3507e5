// tb_dot_product: the inner-product workloads, run through the top level's
// FMA with 16-bit accumulation (R becomes the next C).
//
// Three independent accumulation chains are interleaved so that the
// 3-cycle pipeline takes one operation per cycle. Each chain accumulates
// LEN products of random operands; after each step the hardware result must
// equal the reference model stepped the same way. Run: 42720-long chains
// (an output layer with a 42720-wide inner product) in FP16 mode, and
// 10000-long chains in FP16 mode and in FP8 mode (8-bit A, B; 16-bit
// accumulator). Operands have random signs and magnitudes near 1, so
// the sums wander like a random walk and stay in range. The test also checks
// that a run of N operations takes N cycles plus the 3-cycle drain, and
// prints the final 16-bit sums.
module tb_dot_product;
  import dlf_ref_pkg::*;

  localparam int CH = 3;       // interleaved chains = pipeline depth

  logic        clk = 1'b0;
  logic        rst_n;
  logic        fma_in_valid, fma_fp8_mode;
  logic [15:0] fma_a, fma_b, fma_c;
  logic        fma_out_valid;
  logic [15:0] fma_r;
  logic        fma_naninf;
  logic        q_in_valid = 1'b0;
  logic [31:0] q_x = '0;
  logic        q_out_valid;
  logic [15:0] q_r;
  logic        q_naninf;

  int checks = 0, failures = 0;

  dlfloat_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit [15:0] rnd_op(bit f8);
    if (f8) return {8'h00, 1'($urandom), 5'(13 + $urandom % 4), 2'($urandom)};
    return {1'($urandom), 6'(29 + $urandom % 4), 9'($urandom)};
  endfunction

  task automatic run(int len, bit f8);
    bit [15:0] acc_ref [CH];
    bit [15:0] ea      [CH];
    bit [15:0] eb      [CH];
    longint    t0, t1;
    for (int k = 0; k < CH; k++) acc_ref[k] = 16'h0000;
    @(negedge clk);
    t0 = $time;
    for (int i = 0; i < len; i++) begin
      for (int k = 0; k < CH; k++) begin
        bit [16:0] e;
        ea[k] = rnd_op(f8); eb[k] = rnd_op(f8);
        // chain k's previous result left the pipeline at this very cycle
        fma_a = ea[k]; fma_b = eb[k]; fma_fp8_mode = f8; fma_in_valid = 1'b1;
        fma_c = (i == 0) ? 16'h0000 : fma_r;
        if (i != 0) begin
          checks++;
          if (!fma_out_valid || fma_r !== acc_ref[k]) begin
            failures++;
            if (failures < 10) $display("FAIL chain %0d step %0d: %h exp %h", k, i, fma_r, acc_ref[k]);
          end
        end
        e = ref_fma(ea[k], eb[k], acc_ref[k], f8);
        acc_ref[k] = e[15:0];
        @(negedge clk);
      end
    end
    for (int k = 0; k < CH; k++) begin
      checks++;
      if (fma_r !== acc_ref[k]) failures++;
      @(negedge clk);
      fma_in_valid = 1'b0;
    end
    t1 = $time;
    checks++;
    if ((t1 - t0) / 10 != longint'(len * CH + CH)) failures++;
    $display("  length %0d %s: %0d operations in %0d cycles, final sums %h %h %h",
             len, f8 ? "FP8" : "FP16", len * CH, (t1 - t0) / 10, acc_ref[0], acc_ref[1], acc_ref[2]);
  endtask

  initial begin
    rst_n = 1'b0; fma_in_valid = 1'b0; fma_fp8_mode = 1'b0;
    fma_a = '0; fma_b = '0; fma_c = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(42720, 1'b0);
    run(10000, 1'b0);
    run(10000, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
