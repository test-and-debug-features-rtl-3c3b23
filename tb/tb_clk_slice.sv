// tb_clk_slice: self-checking test of a clock control slice. Counts the
// output clock's rising edges and measures its shortest high pulse in
// functional, powered-down, debug and test modes, and the hold after a
// breakpoint stop until the functional reset.
module tb_clk_slice;
  `include "tb/tb_common.svh"
  logic fclk = 0, tck = 0, rst_n = 1, trst_n = 1;
  logic pd = 0, bp_stop = 0, test_mode = 0, test_en = 0, dbg_en = 0, clk_o, stopped;
  int edges;
  int hi_run, min_run;

  clk_slice dut (.fclk, .tck, .rst_n, .trst_n, .pd, .bp_stop, .test_mode, .test_en, .dbg_en,
                 .clk_o, .stopped);

  always #5  fclk = ~fclk;   // 10 ns period
  always #15 tck  = ~tck;    // 30 ns period

  always @(posedge clk_o) edges++;
  // shortest high pulse, sampled every 1 ns
  always #1 begin
    if (clk_o) hi_run++;
    else begin
      if (hi_run > 0 && hi_run < min_run) min_run = hi_run;
      hi_run = 0;
    end
  end

  // Counts edges over a window and checks that no pulse in it is short.
  task automatic window(input int ns, output int e);
    edges = 0;
    min_run = 1000;
    #(ns);
    e = edges;
    check(e == 0 || min_run >= 4, $sformatf("no short pulse (min high %0d ns)", min_run));
  endtask

  initial begin #100000; check(0, "watchdog"); finish_tb(); end

  initial begin
    int e;
    min_run = 1000;
    hi_run = 0;
    #1 rst_n = 0; trst_n = 0;
    #10 rst_n = 1; trst_n = 1;
    @(posedge fclk); #1;
    window(300, e);
    check(e == 30, $sformatf("functional: 30 edges, got %0d", e));
    check(!stopped, "not stopped");
    @(posedge fclk); #1 pd = 1;
    #5 check(stopped, "enable sampled on the falling edge: stop within half a period");
    #15;
    window(300, e);
    check(e == 0, $sformatf("stopped: 0 edges, got %0d", e));
    check(stopped, "stopped flag");
    @(posedge tck); #1 dbg_en = 1;
    #30;
    window(300, e);
    check(e == 10, $sformatf("debug clock: 10 TCK edges, got %0d", e));
    @(posedge tck); #1 dbg_en = 0;
    #30;
    window(300, e);
    check(e == 0, "debug clock off");
    @(posedge fclk); #1 pd = 0;
    #5 check(!stopped, "restart sampled on the falling edge");
    #15;
    test_mode = 1; test_en = 0;
    #30;
    window(300, e);
    check(e == 0, $sformatf("test mode, gated: 0 edges, got %0d", e));
    @(posedge tck); #1 test_en = 1;
    #30;
    window(300, e);
    check(e == 10, $sformatf("test clock: 10 edges, got %0d", e));
    // breakpoint stop: a one-cycle request holds the domain until reset
    test_mode = 0;
    #30;
    window(100, e);
    check(e == 10, $sformatf("functional again: 10 edges, got %0d", e));
    @(posedge fclk); #1 bp_stop = 1;
    @(posedge fclk); #1 bp_stop = 0;
    #20;
    window(300, e);
    check(e == 0, $sformatf("held after the stop request went away: 0 edges, got %0d", e));
    check(stopped, "stopped flag while held");
    @(posedge tck); #1 dbg_en = 1;
    #30;
    window(300, e);
    check(e == 10, $sformatf("debug clock while held: 10 TCK edges, got %0d", e));
    @(posedge tck); #1 dbg_en = 0;
    #30;
    #2 rst_n = 0;
    #10 rst_n = 1;
    #20;
    window(300, e);
    check(e == 30, $sformatf("functional reset releases the hold: 30 edges, got %0d", e));
    check(!stopped, "not stopped after reset");
    finish_tb();
  end
endmodule
