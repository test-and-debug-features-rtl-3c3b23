// tb_app_settings_reg: self-checking test of the application settings
// register, written once from the pins and once from the TAP side, with
// outputs changing only on load/update, and read back through the TAP.
module tb_app_settings_reg;
  import rto7_pkg::*;
  `include "tb/tb_common.svh"
  logic tck = 0, rst_n = 1, tap_sel = 0, tdi = 0, so;
  logic as_sclk = 0, as_sdata = 0, as_sen = 0, as_ld = 0;
  dr_ctl_t dr_ctl = '0;
  logic [31:0] q;
  logic [1023:0] dout;
  `include "tb/dr_tasks.svh"

  app_settings_reg dut (.rst_n, .tap_sel, .tck, .dr_ctl, .tdi, .as_sclk, .as_sdata,
                        .as_sen, .as_ld, .so, .q);

  task automatic pin_write(input logic [31:0] v);
    as_sen = 1;
    for (int i = 0; i < 32; i++) begin
      as_sdata = v[i];
      #5 as_sclk = 1; #5 as_sclk = 0;
    end
    as_sen = 0;
    as_ld = 1; #5 as_sclk = 1; #5 as_sclk = 0; as_ld = 0;
  endtask

  initial begin #200000; check(0, "watchdog"); finish_tb(); end

  initial begin
    #2 rst_n = 0;
    #20 rst_n = 1;
    check(q == 0, "reset value");
    for (int t = 0; t < 8; t++) begin
      logic [31:0] v1, v2;
      v1 = $urandom;
      v2 = $urandom;
      pin_write(v1);
      check(q == v1, $sformatf("pin write %h got %h", v1, q));
      tap_sel = 1;
      dr_shift(1024'(v2), 32, dout);
      check(q == v1, "no change before update");
      dr_update();
      check(q == v2, $sformatf("TAP write %h got %h", v2, q));
      dr_capture();
      dr_shift('0, 32, dout);
      check(dout[31:0] == v2, "TAP read-back");
      dr_update();
      tap_sel = 0;
    end
    finish_tb();
  end
endmodule
