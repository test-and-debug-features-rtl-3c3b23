// tb_ac_tpr: self-checking test of the access control TPR. Its shift
// stages are its outputs: after two shifts the selection equals the two
// bits shifted in, and it holds while unselected or outside Shift-DR.
module tb_ac_tpr;
  import rto7_pkg::*;
  `include "tb/tb_common.svh"
  logic tck = 0, trst_n = 1, sel = 0, tdi = 0, so;
  dr_ctl_t dr_ctl = '0;
  ac_sel_e ac;
  logic [1023:0] dout;
  `include "tb/dr_tasks.svh"

  ac_tpr dut (.tck, .trst_n, .sel, .dr_ctl, .tdi, .so, .ac);

  initial begin #100000; check(0, "watchdog"); finish_tb(); end

  initial begin
    #2 trst_n = 0;
    #20 trst_n = 1;
    check(ac == AC_BYPASS, "reset selects bypass");
    for (int v = 0; v < 4; v++) begin
      sel = 1;
      dr_shift(1024'(v), 2, dout);
      check(ac == ac_sel_e'(v), $sformatf("select %0d got %0d", v, ac));
      dr_capture();
      dr_update();
      check(ac == ac_sel_e'(v), "no capture/update effect");
      sel = 0;
      dr_shift(1024'(~v), 2, dout);
      check(ac == ac_sel_e'(v), "hold while unselected");
    end
    sel = 1;
    dr_shift(1024'(2'b10), 2, dout);
    dr_shift(1024'(2'b01), 2, dout);
    check(dout[1:0] == 2'b10, "shift-out of previous value");
    finish_tb();
  end
endmodule
