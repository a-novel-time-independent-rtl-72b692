// Self-checking testbench for wait_sampler.
//
// Drives link_clock with random phase lengths and moves link_wait at random
// times, including 1 time unit before and after rising edges. A reference
// copy of wait, taken by the testbench at each rising edge, must match the
// flip-flop's output one time unit after the edge and at every later wait
// change until the next edge. Reset must clear the output.
`timescale 1ns/1ps
module tb_wait_sampler;

  logic link_clock = 1'b0;
  logic rst_n      = 1'b1;
  logic link_wait  = 1'b0;
  logic wait_at_edge;

  int checks   = 0;
  int failures = 0;
  int n_before = 0;
  int n_after  = 0;
  logic ref_wait = 1'b0;

  wait_sampler dut (.*);

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  // One external clock period: low phase, rising edge, high phase. Wait is
  // changed at the offset chosen by mode (0 none, 1 just before the edge,
  // 2 just after the edge, 3 mid low phase, 4 mid high phase).
  task automatic period(input int mode);
    int lo, hi;
    lo = 4 + ($urandom % 20);
    hi = 4 + ($urandom % 20);
    if (mode == 3) begin
      #(lo/2); link_wait = ~link_wait; #(lo - lo/2 - 1);
    end else if (mode == 1) begin
      #(lo - 1); link_wait = ~link_wait; n_before++;
    end else begin
      #(lo - 1);
    end
    #1 link_clock = 1'b1;
    ref_wait = link_wait;
    if (mode == 2) begin
      #1 link_wait = ~link_wait; n_after++;
      #1 check(wait_at_edge, ref_wait, "just-after change leaked");
      #(hi - 2);
    end else if (mode == 4) begin
      #1 check(wait_at_edge, ref_wait, "captured level");
      #(hi/2); link_wait = ~link_wait;
      #1 check(wait_at_edge, ref_wait, "mid-phase change leaked");
      #(hi - hi/2 - 2);
    end else begin
      #1 check(wait_at_edge, ref_wait, "captured level");
      #(hi - 1);
    end
    link_clock = 1'b0;
    #0 check(wait_at_edge, ref_wait, "held to falling edge");
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #2;
    check(wait_at_edge, 1'b0, "reset value");
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) period($urandom % 5);
    // Reset in the middle of a held high value.
    link_wait = 1'b1;
    period(0);
    check(wait_at_edge, 1'b1, "high before reset");
    rst_n = 1'b0;
    #1 check(wait_at_edge, 1'b0, "asynchronous reset");
    rst_n = 1'b1;
    if (n_before == 0 || n_after == 0) begin
      failures++;
      $display("FAIL edge-adjacent wait changes not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
