// tb_bsr: self-checking test of the boundary scan register: SAMPLE
// captures input pins and core outputs, EXTEST drives the output pins from
// the update stage, functional mode passes core outputs through.
module tb_bsr;
  import rto7_pkg::*;
  `include "tb/tb_common.svh"
  logic tck = 0, trst_n = 1, sel = 0, extest = 0, tdi = 0, so;
  dr_ctl_t dr_ctl = '0;
  logic [3:0] pin_in, core_in;
  logic [2:0] core_out, pin_out;
  logic [1023:0] dout;
  `include "tb/dr_tasks.svh"

  bsr #(.NI(4), .NO(3)) dut (.tck, .trst_n, .sel, .extest, .dr_ctl, .tdi, .so,
                             .pin_in, .core_in, .core_out, .pin_out);

  initial begin #200000; check(0, "watchdog"); finish_tb(); end

  initial begin
    #2 trst_n = 0;
    #20 trst_n = 1;
    for (int t = 0; t < 20; t++) begin
      logic [6:0] v, sv;
      pin_in = 4'($urandom);
      core_out = 3'($urandom);
      #1;
      check(core_in == pin_in && pin_out == core_out, "functional pass-through");
      sel = 1;
      dr_capture();
      v = 7'($urandom);
      // so is the MSB (last cell); shifting 7 bits returns the captured word MSB first
      dr_shift(1024'(v), 7, dout);
      for (int i = 0; i < 7; i++) sv[6-i] = dout[i];
      check(sv == {core_out, pin_in}, $sformatf("sample got %h", sv));
      dr_update();
      extest = 1;
      #1;
      // after 7 shifts cell k holds v[6-k]; output cells are cells 4..6
      check(pin_out == {v[0], v[1], v[2]}, "extest drives output pins");
      extest = 0;
      sel = 0;
    end
    finish_tb();
  end
endmodule
