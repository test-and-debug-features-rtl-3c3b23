// tb_bp_cmp: self-checking test of the C/D/E breakpoint module against a
// cycle model of the greater-than and equal flags, the two counters and
// the stop request (a flag whose counter is disabled).
module tb_bp_cmp;
  import rto7_pkg::*;
  `include "tb/tb_common.svh"
  logic clk = 0, rst_n = 0, stop_req;
  logic signed [PH_W-1:0] din;
  bp_cde_ctl_t ctl;
  bp_cde_obs_t obs;
  int cg, ce, n_eq, n_stop;

  bp_cmp dut (.clk, .rst_n, .din, .ctl, .obs, .stop_req);
  always #5 clk = ~clk;

  initial begin #1000000; check(0, "watchdog"); finish_tb(); end

  initial begin
    din = 0;
    ctl = '{ref_val: 12'sd3, en_gt: 1'b1, en_eq: 1'b1};
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    cg = 0; ce = 0;
    for (int t = 0; t < 2600; t++) begin
      bit gt, eq;
      ctl.en_gt = (t % 400) < 300;
      ctl.en_eq = (t % 300) < 200;
      din = PH_W'($signed($urandom % 13) - 6);
      if (t >= 2000) begin   // hold the input on the reference: equal counter saturates
        din = ctl.ref_val;
        ctl.en_eq = 1'b1;
      end
      gt = int'(din) > int'(ctl.ref_val);
      eq = int'(din) == int'(ctl.ref_val);
      if (ctl.en_gt && gt && cg < 511) cg++;
      if (ctl.en_eq && eq && ce < 511) ce++;
      @(negedge clk);
      check(obs.flag_gt == gt && obs.flag_eq == eq, "flags");
      check(int'(obs.cnt_gt) == cg && int'(obs.cnt_eq) == ce, $sformatf("counts want %0d/%0d got %0d/%0d", cg, ce, obs.cnt_gt, obs.cnt_eq));
      check(stop_req == ((gt && !ctl.en_gt) || (eq && !ctl.en_eq)), "stop request");
      if (eq) n_eq++;
      if (stop_req) n_stop++;
    end
    check(n_eq > 50 && n_stop > 50, "equal and stop cases exercised");
    check(ce == 511 && obs.cnt_eq == 9'd511, "equal counter saturates at 511");
    finish_tb();
  end
endmodule
