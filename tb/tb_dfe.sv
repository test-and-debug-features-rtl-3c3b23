// tb_dfe: self-checking test of the decision-feedback equalizer against a
// model: y = x - (decision 8 samples earlier ? +16 : -16), bit = (y >= 0).
module tb_dfe;
  import rto7_pkg::*;
  `include "tb/tb_common.svh"
  logic clk = 0, rst_n = 0, se = 0, si = 0, so, bit_o;
  logic signed [PH_W-1:0] x, y;
  bit dec[$];

  dfe dut (.clk, .rst_n, .se, .si, .so, .x, .y, .bit_o);
  always #5 clk = ~clk;

  initial begin #1000000; check(0, "watchdog"); finish_tb(); end

  initial begin
    x = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 8; k++) dec.push_back(1'b0);
    for (int t = 0; t < 500; t++) begin
      int want;
      x = PH_W'($signed($urandom % 81) - 40);
      want = int'(x) - (dec[0] ? 16 : -16);
      void'(dec.pop_front());
      dec.push_back(want >= 0);
      @(negedge clk);
      check(int'(y) == want, $sformatf("y want %0d got %0d", want, y));
      check(bit_o == (want >= 0), "decision");
    end
    finish_tb();
  end
endmodule
