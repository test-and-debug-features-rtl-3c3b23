// tb_bc_tpr: self-checking test of the 204-bit breakpoint control TPR.
// Checks the reset value, that control fields change only in Update-DR,
// that Capture-DR loads the observed flags and counters together with
// the programmed control value, that the register holds while unselected,
// and the total length (a marker appears after exactly 204 shifts).
module tb_bc_tpr;
  import rto7_pkg::*;
  `include "tb/tb_common.svh"
  logic tck = 0, trst_n = 1, sel = 0, tdi = 0, so;
  dr_ctl_t dr_ctl = '0;
  bc_obs_t obs;
  bc_ctl_t ctl;
  logic [1023:0] dout;
  `include "tb/dr_tasks.svh"

  bc_tpr dut (.tck, .trst_n, .sel, .dr_ctl, .tdi, .so, .obs, .ctl);

  function automatic logic [BC_W-1:0] rnd();
    logic [BC_W-1:0] r;
    for (int i = 0; i < BC_W; i++) r[i] = 1'($urandom);
    return r;
  endfunction

  initial begin #1000000; check(0, "watchdog"); finish_tb(); end

  initial begin
    logic [BC_W-1:0] v, w;
    obs = '0;
    #2 trst_n = 0;
    #20 trst_n = 1;
    check(BC_W == 204, "register length 204");
    check(ctl == bc_ctl_reset(), "reset control value");
    check(ctl.ab[0].en_cnt && ctl.cde[2].en_eq, "reset: counting mode");
    for (int t = 0; t < 6; t++) begin
      bc_ctl_t ctl_before;
      v = rnd();
      ctl_before = ctl;
      sel = 1;
      dr_shift(1024'(v), BC_W, dout);
      check(ctl == ctl_before, "control stable during shift");
      dr_update();
      check(ctl == v[BC_W-1:BC_OBS_W], "update loads control fields");
      w = rnd();
      obs = bc_obs_t'(w[BC_OBS_W-1:0]);
      dr_capture();
      obs = '0;
      dr_shift('0, BC_W, dout);
      check(dout[BC_OBS_W-1:0] == w[BC_OBS_W-1:0], "capture of flags and counters");
      check(dout[BC_W-1:BC_OBS_W] == v[BC_W-1:BC_OBS_W], "capture of control read-back");
      sel = 0;
      dr_capture();
      dr_shift(1024'(rnd()), BC_W, dout);
      dr_update();
      check(ctl == v[BC_W-1:BC_OBS_W], "unselected: control holds");
    end
    // Length: shift a single 1 through zeros.
    sel = 1;
    dr_shift('0, BC_W, dout);
    dr_shift(1024'(1), BC_W + 1, dout);
    check(dout[BC_W] == 1'b1 && dout[BC_W-1:0] == '0, "chain length is 204");
    finish_tb();
  end
endmodule
