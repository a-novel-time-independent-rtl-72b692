// Self-checking testbench for datagen_fsm.
//
// Drives the already-synchronized inputs clock_hi and wait_hi directly on
// falling edges of clk, with 8-bit data so that a wrong value cannot pass by
// chance. A source model presents a random value list and steps to the next
// value on every src_next pulse. For each external clock period the
// testbench works out, from its own count of rising edges with wait low,
// which value must be on `data`, and checks the exact cycle timing:
// one clk after clock_hi is seen the machine is in S3, after the second
// clk a held edge pulses `hold`, after the third a consumed edge has loaded
// the next value and pulses src_next. wait_hi is changed arbitrarily while
// the clock is low and may lag clock_hi by one clk, as the synchronizers
// allow.
`timescale 1ns/1ps
module tb_datagen_fsm;
  import datagen_pkg::*;

  localparam int W = 8;
  localparam int N_EDGES = 600;

  logic         clk = 1'b0;
  logic         rst_n = 1'b1;
  logic         clock_hi = 1'b0;
  logic         wait_hi = 1'b0;
  logic [W-1:0] src_data;
  logic         src_next, hold;
  logic [W-1:0] data;
  src_state_e   state;

  logic [W-1:0] vals [0:N_EDGES+2];
  int src_idx = 0;
  int exp_idx = 0;
  int checks = 0, failures = 0;
  int n_adv = 0, n_hold = 0, n_hold_run = 0, n_skew = 0;

  datagen_fsm #(.DATA_W(W)) dut (.*);

  always #5 clk = ~clk;

  assign src_data = vals[src_idx];
  always_ff @(posedge clk) if (src_next) src_idx <= src_idx + 1;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic cycles(input int n);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    logic w, prev_w;
    int lo, hi;
    foreach (vals[i]) vals[i] = W'($urandom);
    prev_w = 1'b0;
    @(negedge clk) rst_n = 1'b0;
    cycles(2);
    check(state == S0_OUTPUT && data == '0 && !src_next && !hold, "reset state");
    rst_n = 1'b1;
    cycles(6);
    check(data == vals[0], "first value loaded after reset");
    check(state == S2_CLOCK_HI, "waiting for clock high after reset");
    for (int e = 0; e < N_EDGES; e++) begin
      // low phase: wait_hi may do anything
      lo = 4 + ($urandom % 6);
      for (int c = 0; c < lo; c++) begin
        if ($urandom % 3 == 0) wait_hi = $urandom;
        @(negedge clk);
        check(!src_next && !hold, "no action while clock low");
      end
      check(data == vals[exp_idx], "data before rising edge");
      check(state == S2_CLOCK_HI, "in S2 before rising edge");
      w = (e % 7 == 3) ? 1'b1 : (e % 7 == 4) ? prev_w : 1'($urandom % 3 == 0);
      clock_hi = 1'b1;
      if ($urandom % 2) begin
        wait_hi = w;
        cycles(1);
      end else begin
        wait_hi = ~w;      // stale value one clk longer
        n_skew++;
        cycles(1);
        wait_hi = w;
      end
      check(state == S3_TEST_WAIT, "S3 one clk after clock high");
      cycles(1);
      check(hold == w, "hold pulse two clks after clock high");
      check(data == vals[exp_idx], "data unchanged two clks after clock high");
      cycles(1);
      check(src_next == !w, "src_next pulse three clks after clock high");
      if (!w) begin
        exp_idx++;
        n_adv++;
      end else begin
        n_hold++;
        if (prev_w) n_hold_run++;
      end
      check(data == vals[exp_idx], "data three clks after clock high");
      prev_w = w;
      hi = 1 + ($urandom % 6);
      for (int c = 0; c < hi; c++) begin
        @(negedge clk);
        check(!src_next && !hold && data == vals[exp_idx], "quiet while clock high");
      end
      clock_hi = 1'b0;
    end
    check(src_idx == exp_idx + 1, "source stepped once per consumed edge");
    if (n_adv == 0 || n_hold == 0 || n_hold_run == 0 || n_skew == 0) begin
      failures++;
      $display("FAIL mechanism not exercised: adv=%0d hold=%0d hold_run=%0d skew=%0d",
               n_adv, n_hold, n_hold_run, n_skew);
    end
    $display("advances=%0d holds=%0d consecutive_holds=%0d skewed_wait=%0d",
             n_adv, n_hold, n_hold_run, n_skew);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
