// Shared types of the data generator with wait.
//
// The data source is a polled state machine whose places follow the
// data-source graph of the design (places S0..S2 keep their numbering):
//   S0  output the next data value, then go to S1
//   S1  wait until the external clock is seen low
//   S2  wait until the external clock is seen high (one rising edge has
//       happened since S1)
//   S3  test the wait level that a flip-flop captured at that rising edge:
//       high -> hold the data and go back to S1, low -> go to S0
// S0..S2 have the meaning of the original graph. S3 here is this design's
// own place: in the original graph S3 waited for wait to fall, which is not
// needed once wait is captured in hardware at the clock edge.
package datagen_pkg;

  typedef enum logic [1:0] {
    S0_OUTPUT    = 2'd0,
    S1_CLOCK_LO  = 2'd1,
    S2_CLOCK_HI  = 2'd2,
    S3_TEST_WAIT = 2'd3
  } src_state_e;

endpackage
