// Data generator with wait: top level.
//
// A receiver samples `data` on every rising edge of link_clock. If link_wait
// is high at a rising edge, the receiver is not ready: `data` must then stay
// stable until after the next rising edge at which link_wait is low, and only
// then may the next value from the local source appear. A purely polled
// implementation cannot meet this, because it can neither see the exact
// instant of the clock edge nor read wait at that instant. This design
// therefore captures wait in hardware with a flip-flop clocked by
// link_clock (wait_sampler) and lets a polled state machine (datagen_fsm),
// running on the local clock clk, read the captured level after it has seen
// the clock rise.
//
// Structure:
//   wait_sampler   D flip-flop on link_clock, D = link_wait
//   bit_sync x2    bring link_clock and the captured wait into clk's domain
//   datagen_fsm    polled source machine and data register
//
// Interface: src_data is the next value of the local data source; src_next
// pulses for one clk when it has been taken, after which the source may
// present the following value. held pulses for one clk each time a rising
// edge with wait high has made the machine keep the data. DATA_W = 1 (a single data bit) as in the
// design; the source itself lies outside this block.
//
// Timing: data changes at most SYNC_STAGES+4 clk periods after a rising edge
// of link_clock at which link_wait was low, and never after one at which it
// was high. Each phase of link_clock must last at least SYNC_STAGES+4 clk
// periods. Apart from that, nothing depends on the speed of either side.
// The synchronizers, their depth and the reset are this design's choices.
module datagen_wait
#(
  parameter int unsigned DATA_W      = 1,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              link_clock,
  input  logic              link_wait,
  input  logic [DATA_W-1:0] src_data,
  output logic              src_next,
  output logic              held,
  output logic [DATA_W-1:0] data
);

  logic       wait_at_edge;
  logic       clock_hi_s;
  logic       wait_hi_s;

  wait_sampler u_wait_sampler (
    .link_clock   (link_clock),
    .rst_n        (rst_n),
    .link_wait    (link_wait),
    .wait_at_edge (wait_at_edge)
  );

  bit_sync #(.STAGES(SYNC_STAGES)) u_sync_clock (
    .clk   (clk),
    .rst_n (rst_n),
    .d     (link_clock),
    .q     (clock_hi_s)
  );

  bit_sync #(.STAGES(SYNC_STAGES)) u_sync_wait (
    .clk   (clk),
    .rst_n (rst_n),
    .d     (wait_at_edge),
    .q     (wait_hi_s)
  );

  datagen_fsm #(.DATA_W(DATA_W)) u_fsm (
    .clk      (clk),
    .rst_n    (rst_n),
    .clock_hi (clock_hi_s),
    .wait_hi  (wait_hi_s),
    .src_data (src_data),
    .src_next (src_next),
    .hold     (held),
    .data     (data),
    .state    ()
  );

endmodule
