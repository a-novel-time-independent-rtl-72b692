// Multi-stage flip-flop synchronizer for one asynchronous level.
//
// The input is sampled on every rising edge of clk and passed through
// STAGES flip-flops so that a metastable first stage has STAGES-1 clock
// periods to settle before the level is used. The output lags the input by
// STAGES to STAGES+1 clk periods. Reset (asynchronous, active low) clears
// all stages to RESET_VAL. The number of stages is this design's choice.
module bit_sync #(
  parameter int unsigned STAGES    = 2,
  parameter logic        RESET_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  logic [STAGES-1:0] chain;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chain <= {STAGES{RESET_VAL}};
    else        chain <= {chain[STAGES-2:0], d};
  end

  assign q = chain[STAGES-1];

  initial assert (STAGES >= 2) else $error("bit_sync: STAGES must be at least 2");

endmodule
