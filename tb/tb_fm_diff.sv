// tb_fm_diff: self-checking test of the phase differentiator: output is
// the modulo-4096 difference of consecutive phases, one cycle later.
module tb_fm_diff;
  import rto7_pkg::*;
  `include "tb/tb_common.svh"
  logic clk = 0, rst_n = 0, se = 0, si = 0, so;
  logic signed [PH_W-1:0] phase, freq;
  int prev;

  fm_diff dut (.clk, .rst_n, .se, .si, .so, .phase, .freq);
  always #5 clk = ~clk;

  initial begin #1000000; check(0, "watchdog"); finish_tb(); end

  initial begin
    phase = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    prev = 0;
    for (int t = 0; t < 500; t++) begin
      int want;
      phase = (t % 50 < 25) ? PH_W'(prev + 300) : PH_W'($urandom);
      want = (int'(phase) - prev + 8192) % 4096;
      if (want >= 2048) want -= 4096;
      prev = int'(phase);
      @(negedge clk);
      check(int'(freq) == want, $sformatf("want %0d got %0d", want, freq));
    end
    finish_tb();
  end
endmodule
