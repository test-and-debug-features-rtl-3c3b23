// tb_tcb: self-checking test of the test control block. Shifts random
// values in, checks that the outputs do not move until Update-DR, that
// they take the shifted value then, that the register ignores strobes
// while not selected, and that a capture reads the applied value back.
module tb_tcb;
  import rto7_pkg::*;
  `include "tb/tb_common.svh"
  logic tck = 0, trst_n = 1, sel = 0, tdi = 0, so;
  dr_ctl_t dr_ctl = '0;
  logic [4:0] q;
  logic [1023:0] dout;
  `include "tb/dr_tasks.svh"

  tcb #(.W(5)) dut (.tck, .trst_n, .sel, .dr_ctl, .tdi, .so, .cap_val(5'h00), .q);

  initial begin #100000; check(0, "watchdog"); finish_tb(); end

  initial begin
    #2 trst_n = 0;
    #20 trst_n = 1;
    check(q == 5'h00, "reset value");
    for (int t = 0; t < 20; t++) begin
      logic [4:0] v, old;
      v = 5'($urandom);
      old = q;
      sel = 1;
      dr_shift(1024'(v), 5, dout);
      check(q == old, "outputs stable during shift");
      dr_update();
      check(q == v, $sformatf("update value %h got %h", v, q));
      sel = 0;
      dr_shift(1024'(~v), 5, dout);
      dr_update();
      check(q == v, "unselected register holds");
      sel = 1;
      dr_shift(1024'(~v), 5, dout);
      sel = 0;
      dr_update();
      check(q == v, "Update-DR while not selected leaves the outputs alone");
      sel = 1;
      dr_capture();
      dr_shift('0, 5, dout);
      check(dout[4:0] == v, $sformatf("capture read-back %h got %h", v, dout[4:0]));
      sel = 0;
    end
    finish_tb();
  end
endmodule
