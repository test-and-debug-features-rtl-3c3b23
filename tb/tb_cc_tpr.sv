// tb_cc_tpr: self-checking test of the clock control TPR: reset value,
// update of the four control bits, capture of the two status bits, and
// that status bits never reach the control outputs.
module tb_cc_tpr;
  import rto7_pkg::*;
  `include "tb/tb_common.svh"
  logic tck = 0, trst_n = 1, sel = 0, tdi = 0, so, stopped8 = 0, stopped64 = 0;
  dr_ctl_t dr_ctl = '0;
  cc_t cc;
  logic [1023:0] dout;
  `include "tb/dr_tasks.svh"

  cc_tpr dut (.tck, .trst_n, .sel, .dr_ctl, .tdi, .so, .stopped8, .stopped64, .cc);

  initial begin #100000; check(0, "watchdog"); finish_tb(); end

  initial begin
    #2 trst_n = 0;
    #20 trst_n = 1;
    check(cc == 6'b000011, "reset: stop both domains, no debug clock");
    for (int t = 0; t < 16; t++) begin
      logic [5:0] v;
      v = 6'($urandom);
      sel = 1;
      dr_shift(1024'(v), 6, dout);
      dr_update();
      check(cc[3:0] == v[3:0] && cc[5:4] == 2'b00, $sformatf("update %h got %h", v, cc));
      stopped8 = t[0];
      stopped64 = t[1];
      dr_capture();
      dr_shift('0, 6, dout);
      check(dout[5:0] == {t[1], t[0], v[3:0]}, $sformatf("capture got %h", dout[5:0]));
      sel = 0;
    end
    finish_tb();
  end
endmodule
