// dr_tasks.svh: drive a TAP data register directly through its dr_ctl
// strobes. Expects tck, dr_ctl, tdi and so at module scope. Bits are
// shifted LSB first; dout[i] is the register output before the i-th shift.
task automatic tck_pulse();
  #5 tck = 1'b1;
  #5 tck = 1'b0;
endtask

task automatic dr_capture();
  dr_ctl = '{capture: 1'b1, shift: 1'b0, update: 1'b0};
  tck_pulse();
  dr_ctl = '0;
endtask

task automatic dr_shift(input logic [1023:0] din, input int n, output logic [1023:0] dout);
  dout = '0;
  dr_ctl = '{capture: 1'b0, shift: 1'b1, update: 1'b0};
  for (int i = 0; i < n; i++) begin
    tdi = din[i];
    #1 dout[i] = so;
    tck_pulse();
  end
  dr_ctl = '0;
endtask

task automatic dr_update();
  dr_ctl = '{capture: 1'b0, shift: 1'b0, update: 1'b1};
  tck_pulse();
  dr_ctl = '0;
endtask
