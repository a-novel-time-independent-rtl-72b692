// End-to-end testbench for the data generator with wait (datagen_wait), at
// its default parameters.
//
// The testbench plays the receiver and the two signal generators: it drives
// link_clock with random phase lengths (from just above the minimum the
// polling allows to many times that), moves link_wait at chosen places
// around the rising edges, and models the local data source as a list of
// random bits that steps on every src_next pulse.
//
// Reference model, independent of the design: at every rising edge of
// link_clock the receiver checks that `data` is the value it expects, and
// consumes it only if link_wait is low at that edge. Between two edges the
// design must have taken exactly one new value from the source if the
// earlier edge consumed, and none if wait held it. The new value is loaded
// on the SYNC_STAGES+3-th clk edge after the link edge (the synchronizer
// stages, then the S2 -> S3 -> S0 steps of the polled machine), so its
// src_next pulse is sampled high on exactly the SYNC_STAGES+4-th clk edge.
//
// Mechanisms counted, each of which must happen: data consumed, data held by
// wait, wait rising just before an edge (held), wait rising just after an
// edge (not held), wait falling just before an edge (consumed), wait falling
// just after an edge (held), two held edges in a row, fast and slow link
// clocks.
`timescale 1ns/1ps
module tb_datagen_wait;

  localparam int N_PERIODS = 3000;
  localparam int SYNC      = 2;       // the design's default SYNC_STAGES
  localparam int LATENCY   = SYNC + 4;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic link_clock = 1'b0;
  logic link_wait = 1'b0;
  logic src_data;
  logic src_next;
  logic held;
  logic data;

  datagen_wait dut (.*);

  always #5 clk = ~clk;

  // Local source: random bits, one step per src_next pulse.
  logic vals [0:N_PERIODS+4];
  int   src_idx = 0;
  assign src_data = vals[src_idx];
  always_ff @(posedge clk) if (src_next) src_idx <= src_idx + 1;

  int checks = 0, failures = 0;
  int n_adv = 0, n_hold = 0, n_before = 0, n_after = 0, n_fall_before = 0;
  int n_fall_after = 0, n_hold_run = 0, n_fast = 0, n_slow = 0, n_held_pulse = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Receiver: expectations kept by the testbench alone.
  int   exp_idx = 0;        // index of the value the receiver must see
  logic last_wait = 1'b1;   // wait at the previous edge (none before the first)
  int   nexts_since = 0;    // src_next pulses since the previous edge
  int   helds_since = 0;
  int   clk_since = 0;      // clk edges since the previous link edge
  int   next_at = -1;       // clk edge count at which src_next was seen
  logic started = 1'b0;

  always @(posedge clk) begin
    clk_since++;
    if (src_next) begin
      nexts_since++;
      next_at = clk_since;
    end
    if (held) begin
      helds_since++;
      n_held_pulse++;
    end
  end

  always @(posedge link_clock) if (started) begin
    if (last_wait == 1'b0) begin
      check(nexts_since == 1, "one source step after a consuming edge");
      check(next_at == LATENCY, $sformatf("source step latency %0d", next_at));
      check(helds_since == 0, "no hold after a consuming edge");
    end else if (exp_idx > 0 || n_hold > 0) begin
      check(nexts_since == 0, "no source step after a held edge");
      check(helds_since == 1, "one hold pulse after a held edge");
    end
    check(data == vals[exp_idx], "data at rising edge");
    if (!link_wait) begin
      exp_idx++;
      n_adv++;
    end else begin
      n_hold++;
      if (last_wait) n_hold_run++;
    end
    last_wait = link_wait;
    nexts_since = 0;
    helds_since = 0;
    clk_since = 0;
    next_at = -1;
  end

  // One link clock period. mode: 0 keep wait, 1 rise just before the edge,
  // 2 rise just after, 3 fall just before, 4 fall just after, 5 random level
  // in the low phase.
  task automatic period(input int mode, input int lo, input int hi);
    if (mode == 5) begin
      #(lo/2) link_wait = 1'($urandom);
      #(lo - lo/2 - 1);
    end else if (mode == 2 || mode == 4) begin
      link_wait = (mode == 4);
      #(lo - 1);
    end else if (mode == 1 || mode == 3) begin
      link_wait = (mode == 3);
      #(lo - 1) link_wait = (mode == 1);
      if (mode == 1) n_before++; else n_fall_before++;
    end else begin
      #(lo - 1);
    end
    #1 link_clock = 1'b1;
    if (mode == 2 || mode == 4) begin
      #1 link_wait = (mode == 2);
      if (mode == 2) n_after++; else n_fall_after++;
      #(hi - 1);
    end else begin
      #(hi);
    end
    link_clock = 1'b0;
  endtask

  initial begin
    int lo, hi, mode;
    foreach (vals[i]) vals[i] = 1'($urandom);
    #0.5;
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    #100;
    check(data == vals[0], "first value present before the first edge");
    check(src_idx == 1, "source stepped once after reset");
    started = 1'b1;
    for (int p = 0; p < N_PERIODS; p++) begin
      // minimum phase: (SYNC+4) clk periods plus margin for edge alignment
      if (p % 5 == 0) begin
        lo = (SYNC + 5) * 10 + ($urandom % 5);
        hi = (SYNC + 5) * 10 + ($urandom % 5);
        n_fast++;
      end else if (p % 11 == 0) begin
        lo = 600 + ($urandom % 900);
        hi = 600 + ($urandom % 900);
        n_slow++;
      end else begin
        lo = 70 + ($urandom % 200);
        hi = 70 + ($urandom % 200);
      end
      mode = (p % 13 == 6) ? 1 : $urandom % 6;
      period(mode, lo, hi);
    end
    link_wait = 1'b0;
    #(200);
    check(data == vals[exp_idx], "data after the last edge");
    check(src_idx == exp_idx + 1, "source stepped once per consumed edge");
    check(n_held_pulse == n_hold, "held pulses match held edges");
    if (n_adv == 0 || n_hold == 0 || n_before == 0 || n_after == 0 || n_fall_before == 0 ||
        n_fall_after == 0 || n_hold_run == 0 || n_fast == 0 || n_slow == 0) begin
      failures++;
      $display("FAIL a mechanism was not exercised");
    end
    $display("consumed=%0d held=%0d wait_rise_before=%0d wait_rise_after=%0d wait_fall_before=%0d wait_fall_after=%0d held_twice=%0d fast=%0d slow=%0d",
             n_adv, n_hold, n_before, n_after, n_fall_before, n_fall_after, n_hold_run, n_fast, n_slow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
