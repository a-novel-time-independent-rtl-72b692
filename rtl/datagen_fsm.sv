// Polled data-source state machine of the data generator with wait.
//
// The receiver samples `data` on each rising edge of an external clock. A
// rising edge at which wait was high must not consume the data: it has to
// stay stable until after the next rising edge at which wait is low. This
// machine runs on a fast local clock and polls two levels that have already
// been brought into its clock domain:
//   clock_hi - the external clock
//   wait_hi  - the wait level captured by a flip-flop at the last rising
//              edge of the external clock (see wait_sampler)
// Places (see datagen_pkg): S0 loads src_data into the data register and
// pulses src_next; S1 waits for clock_hi low; S2 waits for clock_hi high;
// S3 tests wait_hi one clk after S2 saw the clock high (that extra cycle
// lets a synchronized wait_hi that resolved one cycle later than clock_hi
// catch up) and either holds the data (back to S1, pulses hold) or goes to
// S0. Every place holds one atomic test or one atomic action, following the
// rule that a polled machine must test one input at a time.
//
// The split of S2 into "clock low" and "clock high" tests follows the
// corrected S2 of the design; testing a captured wait instead of the live
// wait line is the hardware remedy the design names. Reset enters S0 so
// that a first value is on `data` before the first clock edge (the original
// graph starts with its token in S2 and data already valid); that, the data
// register's reset value of zero and the hold pulse are this design's
// choices.
//
// Timing: `data` changes one clk after S0, at most SYNC+4 clk periods after a
// rising edge of the external clock if the inputs come through SYNC
// synchronizer stages. Each phase of the external clock must last at least
// SYNC+4 clk periods so that no phase is missed by the polling.
module datagen_fsm
  import datagen_pkg::*;
#(
  parameter int unsigned DATA_W = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clock_hi,   // external clock, synchronized
  input  logic              wait_hi,    // wait captured at the clock edge, synchronized
  input  logic [DATA_W-1:0] src_data,   // next value from the local source
  output logic              src_next,   // pulse: src_data taken
  output logic              hold,       // pulse: an edge with wait high held the data
  output logic [DATA_W-1:0] data,       // data presented to the receiver
  output src_state_e        state       // current place, for observation
);

  src_state_e state_d;

  always_comb begin
    state_d = state;
    unique case (state)
      S0_OUTPUT:    state_d = S1_CLOCK_LO;
      S1_CLOCK_LO:  if (!clock_hi) state_d = S2_CLOCK_HI;
      S2_CLOCK_HI:  if (clock_hi)  state_d = S3_TEST_WAIT;
      S3_TEST_WAIT: state_d = wait_hi ? S1_CLOCK_LO : S0_OUTPUT;
      default:      state_d = S0_OUTPUT;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S0_OUTPUT;
      data     <= '0;
      src_next <= 1'b0;
      hold     <= 1'b0;
    end else begin
      state    <= state_d;
      src_next <= (state == S0_OUTPUT);
      hold     <= (state == S3_TEST_WAIT) && wait_hi;
      if (state == S0_OUTPUT) data <= src_data;
    end
  end

  // The data register may only change in the cycle after the output place.
  property p_data_only_after_output;
    @(posedge clk) disable iff (!rst_n)
      (data != $past(data)) |-> ($past(state) == S0_OUTPUT);
  endproperty
  a_data_only_after_output: assert property (p_data_only_after_output);

  // Output and hold never happen together.
  a_next_hold_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(src_next && hold));

endmodule
