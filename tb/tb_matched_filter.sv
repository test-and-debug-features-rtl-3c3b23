// tb_matched_filter: self-checking test of the matched filters against a
// direct moving average of the last 8 inputs (floor division by 8).
module tb_matched_filter;
  import rto7_pkg::*;
  `include "tb/tb_common.svh"
  logic clk = 0, rst_n = 0, se = 0, si = 0, so;
  logic signed [AB_W-1:0] i_in, q_in, i_out, q_out;
  int hi[$], hq[$];

  matched_filter dut (.clk, .rst_n, .se, .si, .so, .i_in, .q_in, .i_out, .q_out);
  always #5 clk = ~clk;

  initial begin #1000000; check(0, "watchdog"); finish_tb(); end

  initial begin
    i_in = 0; q_in = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 8; k++) begin hi.push_back(0); hq.push_back(0); end
    for (int t = 0; t < 500; t++) begin
      int si_, sq_;
      i_in = AB_W'($signed($urandom % 1000000) - 500000);
      q_in = AB_W'($signed($urandom % 1000000) - 500000);
      hi.push_back(int'(i_in)); void'(hi.pop_front());
      hq.push_back(int'(q_in)); void'(hq.pop_front());
      si_ = 0; sq_ = 0;
      foreach (hi[k]) begin si_ += hi[k]; sq_ += hq[k]; end
      @(negedge clk);
      check(int'(i_out) == (si_ >>> 3), $sformatf("I want %0d got %0d", si_ >>> 3, i_out));
      check(int'(q_out) == (sq_ >>> 3), $sformatf("Q want %0d got %0d", sq_ >>> 3, q_out));
    end
    finish_tb();
  end
endmodule
