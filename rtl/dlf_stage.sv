// dlf_stage: staging latch (pipeline register) of the DLFloat16 FMA.
//
// One W-bit payload register and its valid bit. The payload is loaded only
// in cycles where valid_in is 1, so idle cycles do not toggle the wide
// register; valid_out follows valid_in one cycle later. Active-low
// synchronous reset clears both. Edge-triggered flip-flops stand in for the
// latches of the original design; the enable-on-valid and the reset are
// this design's choice.
module dlf_stage #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid_in,
  input  logic [W-1:0] d,
  output logic         valid_out,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_out <= 1'b0;
      q         <= '0;
    end else begin
      valid_out <= valid_in;
      if (valid_in) q <= d;
    end
  end

endmodule
