// dlfloat_top: DLFloat16 arithmetic, top level.
//
// Two independent units side by side, each with its own ports:
//   - dlf_fma: the pipelined DLFloat16 fused multiply-add R = C + A*B
//     (fp8_mode selects 8-bit A and B), 3-cycle latency, one per cycle;
//   - dlf_q_fp32: the FP32 -> DLFloat16 round-nearest-up quantizer used
//     when FP32 master weights are copied to DLFloat16, combinational,
//     here followed by one output register so that both units present
//     registered results.
// Reset is active low and synchronous.
module dlfloat_top (
  input  logic        clk,
  input  logic        rst_n,
  // FMA
  input  logic        fma_in_valid,
  input  logic        fma_fp8_mode,
  input  logic [15:0] fma_a,
  input  logic [15:0] fma_b,
  input  logic [15:0] fma_c,
  output logic        fma_out_valid,
  output logic [15:0] fma_r,
  output logic        fma_naninf,
  // quantizer
  input  logic        q_in_valid,
  input  logic [31:0] q_x,
  output logic        q_out_valid,
  output logic [15:0] q_r,
  output logic        q_naninf
);

  dlf_fma u_fma (
    .clk, .rst_n, .in_valid(fma_in_valid), .fp8_mode(fma_fp8_mode),
    .a(fma_a), .b(fma_b), .c(fma_c),
    .out_valid(fma_out_valid), .r(fma_r), .naninf(fma_naninf)
  );

  logic [15:0] q_r_d;
  logic        q_naninf_d;
  dlf_q_fp32 u_q (.x(q_x), .r(q_r_d), .naninf(q_naninf_d));

  dlf_stage #(.W(17)) u_q_reg (
    .clk, .rst_n, .valid_in(q_in_valid), .d({q_naninf_d, q_r_d}),
    .valid_out(q_out_valid), .q({q_naninf, q_r})
  );

endmodule
