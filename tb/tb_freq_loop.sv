// tb_freq_loop: self-checking test of the frequency compensation loop.
// Open loop: the integrator follows acc -= 8*f exactly and the NCO word is
// -256 + acc/256. Closed loop: a residual frequency equal to an offset
// plus the loop error is fed back (what the demodulator sees); the
// residual must settle to within +-1 of zero for offsets of +-40.
module tb_freq_loop;
  import rto7_pkg::*;
  `include "tb/tb_common.svh"
  logic clk = 0, rst_n = 0, se = 0, si = 0, so;
  logic signed [PH_W-1:0] freq_in, err, nco_freq;
  int acc;

  freq_loop dut (.clk, .rst_n, .se, .si, .so, .freq_in, .err, .nco_freq);
  always #5 clk = ~clk;

  initial begin #1000000; check(0, "watchdog"); finish_tb(); end

  initial begin
    freq_in = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    acc = 0;
    check(nco_freq == -256, "default word -256");
    for (int t = 0; t < 100; t++) begin
      freq_in = PH_W'($signed($urandom % 21) - 10);
      acc -= 8 * int'(freq_in);
      @(negedge clk);
      check(int'(err) == (acc >>> 8), $sformatf("err want %0d got %0d", acc >>> 8, err));
      check(int'(nco_freq) == -256 + (acc >>> 8), "nco word");
    end
    foreach (offs[k]) begin
      rst_n = 0; @(negedge clk); rst_n = 1;
      for (int t = 0; t < 600; t++) begin
        freq_in = PH_W'(offs[k] + int'(err));
        @(negedge clk);
      end
      freq_in = PH_W'(offs[k] + int'(err));
      check(freq_in >= -1 && freq_in <= 1, $sformatf("offset %0d: residual %0d", offs[k], freq_in));
      check(int'(nco_freq) == -256 - offs[k] || int'(nco_freq) == -256 - offs[k] + 1 ||
            int'(nco_freq) == -256 - offs[k] - 1, $sformatf("nco word %0d", nco_freq));
    end
    finish_tb();
  end
  int offs[4] = '{40, -40, 13, -7};
endmodule
