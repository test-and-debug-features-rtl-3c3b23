// tb_bp_range: self-checking test of the A/B breakpoint module against a
// cycle model: flag = input outside [lo, hi] one cycle earlier; counter
// counts out-of-range cycles when enabled and saturates at 511; a stop is
// requested only with the counter disabled.
module tb_bp_range;
  import rto7_pkg::*;
  `include "tb/tb_common.svh"
  logic clk = 0, rst_n = 0, stop_req;
  logic signed [AB_W-1:0] din;
  bp_ab_ctl_t ctl;
  bp_ab_obs_t obs;
  int cnt;
  bit flag, stops;

  bp_range dut (.clk, .rst_n, .din, .ctl, .obs, .stop_req);
  always #5 clk = ~clk;

  initial begin #1000000; check(0, "watchdog"); finish_tb(); end

  initial begin
    din = 0;
    ctl = '{lo: -20'sd1000, hi: 20'sd2000, en_cnt: 1'b1};
    @(negedge clk); @(negedge clk);
    check(obs == '0, "sync reset clears flag and counter");
    rst_n = 1;
    cnt = 0;
    for (int t = 0; t < 1500; t++) begin
      bit oor;
      if (t == 1000) ctl.en_cnt = 1'b0;
      if (t == 700) begin ctl.lo = -20'sd10; ctl.hi = 20'sd10; end
      din = AB_W'($signed($urandom % 8000) - 4000);
      // every fourth sample sits on a range boundary
      case ($urandom % 16)
        0: din = ctl.lo - 1'b1;
        1: din = ctl.lo;
        2: din = ctl.hi;
        3: din = ctl.hi + 1'b1;
        default: ;
      endcase
      oor = (int'(din) < int'(ctl.lo)) || (int'(din) > int'(ctl.hi));
      if (ctl.en_cnt && oor && cnt < 511) cnt++;
      @(negedge clk);
      check(obs.flag == oor, "flag");
      check(int'(obs.cnt) == cnt, $sformatf("count want %0d got %0d", cnt, obs.cnt));
      check(stop_req == (oor && !ctl.en_cnt), "stop request");
      if (stop_req) stops = 1;
    end
    check(cnt == 511, "counter saturated");
    check(stops, "a stop was requested");
    finish_tb();
  end
endmodule
