// Wait sampler: a D flip-flop clocked by the external link clock with the
// wait line on its D input.
//
// A polling state machine cannot see the exact instant the clock rises, nor
// read wait at that instant, so a wait change just before or just after the
// edge would be misjudged. This flip-flop takes the decision in hardware: its
// output holds the level wait had at the most recent rising edge of
// link_clock and keeps it until the next rising edge. The flip-flop itself is
// the remedy the design calls for; the asynchronous active-low reset that
// clears it to "no wait" is this design's choice.
//
// Timing: wait_at_edge changes only a clock-to-q delay after a rising edge
// of link_clock. Wait must obey the flip-flop's setup and hold window around
// that edge; a change inside the window may leave the flip-flop metastable,
// which the synchronizer that reads wait_at_edge in the polling domain
// absorbs.
module wait_sampler (
  input  logic link_clock,
  input  logic rst_n,
  input  logic link_wait,
  output logic wait_at_edge
);

  always_ff @(posedge link_clock or negedge rst_n) begin
    if (!rst_n) wait_at_edge <= 1'b0;
    else        wait_at_edge <= link_wait;
  end

endmodule
