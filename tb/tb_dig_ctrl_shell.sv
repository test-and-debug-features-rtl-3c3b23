// tb_dig_ctrl_shell: self-checking test of the digital controller in its
// test shell. Counts rising edges of the gated domain clocks to check:
// 8 MHz = 64 MHz / 8; power-down via the settings pins stops both clocks;
// a breakpoint stop request stops both clocks, holds them until the next
// functional reset and is reported through the
// CC-TPR capture; CC-TPR bits select which domain stops; a debug scan
// gives exactly one TCK pulse per Shift-DR cycle to the selected domain;
// DBG_RESET restarts the clocks and the stop is ignored while the
// internal reset is active; test mode clocks the domains from TCK only
// with the TCB's clock enable; and the two test scan chains are
// continuous with the expected lengths (6 and 2 + 6).
module tb_dig_ctrl_shell;
  import rto7_pkg::*;
  `include "tb/tb_common.svh"
  logic clk64_in = 0, rst_pin_n = 1, tck = 0, trst_n = 1, tdi = 0, dbg_reset = 0;
  logic tcb_so, cc_so, app_so, test_mode = 0, test_se = 0, dbg_stop_req = 0;
  logic as_sclk = 0, as_sdata = 0, as_sen = 0, as_ld = 0;
  logic [1:0] scan_si = '0, scan_so;
  logic [31:0] app_q;
  logic clk64_g, clk8_g, rst8_n, clk8_pin, rst_pin_o, so;
  instr_e instr = I_BYPASS;
  dr_ctl_t dr_ctl = '0;
  logic [1023:0] dout;
  int e64, e8;
  `include "tb/dr_tasks.svh"

  dig_ctrl_shell dut (.clk64_in, .rst_pin_n, .tck, .trst_n, .tdi, .instr, .dr_ctl, .dbg_reset,
    .tcb_si(tdi), .tcb_so, .cc_so, .app_so, .test_mode, .test_se, .scan_si, .scan_so,
    .dbg_stop_req, .as_sclk, .as_sdata, .as_sen, .as_ld, .app_q, .clk64_g, .clk8_g, .rst8_n,
    .clk8_pin, .rst_pin_o);

  assign so = (instr == I_PROGRAM_DBG_CC) ? cc_so : tcb_so;

  always #2 clk64_in = ~clk64_in;           // 4 ns period (TCK is 10 ns)
  always @(posedge clk64_g) e64++;
  always @(posedge clk8_g) e8++;

  task automatic count(input int ns, output int a, output int b);
    e64 = 0; e8 = 0;
    #(ns);
    a = e64; b = e8;
  endtask

  task automatic pin_write(input logic [31:0] v);
    as_sen = 1;
    for (int i = 0; i < 32; i++) begin as_sdata = v[i]; #5 as_sclk = 1; #5 as_sclk = 0; end
    as_sen = 0;
    as_ld = 1; #5 as_sclk = 1; #5 as_sclk = 0; as_ld = 0;
  endtask

  task automatic program_cc(input cc_t v);
    instr = I_PROGRAM_DBG_CC;
    dr_shift(1024'(v), CC_W, dout);
    dr_update();
    instr = I_BYPASS;
  endtask

  initial begin #2000000; check(0, "watchdog"); finish_tb(); end

  initial begin
    int a, b;
    cc_t capd;
    #1 rst_pin_n = 0; trst_n = 0;
    #40 rst_pin_n = 1; trst_n = 1;
    wait (rst8_n);
    count(3200, a, b);
    check(a >= 799 && a <= 801 && b >= 99 && b <= 101, $sformatf("free run: %0d x 64 MHz, %0d x 8 MHz", a, b));
    // power down
    pin_write(32'h1);
    #100;
    count(800, a, b);
    check(a == 0 && b == 0, "power-down stops both clocks");
    pin_write(32'h0);
    #100;
    count(800, a, b);
    check(a == 200 && b == 25, $sformatf("clocks resume after power-down (%0d, %0d)", a, b));
    // breakpoint stop, both domains (CC-TPR reset value)
    dbg_stop_req = 1;
    #100;
    count(800, a, b);
    check(a == 0 && b == 0, "breakpoint stops both domains");
    instr = I_PROGRAM_DBG_CC;
    dr_capture();
    dr_shift(1024'(6'b000011), CC_W, dout);
    capd = cc_t'(dout[CC_W-1:0]);
    check(capd.stopped8 && capd.stopped64, "CC-TPR captures stopped status");
    instr = I_BYPASS;
    // debug scan clock to the 8 MHz domain only
    program_cc('{stop8: 1'b1, stop64: 1'b1, dbg_clk8: 1'b1, default: 1'b0});
    instr = I_DBG_SCAN;
    e64 = 0; e8 = 0;
    dr_shift('0, 37, dout);
    #20;
    check(e8 == 37 && e64 == 0, $sformatf("debug scan: %0d TCK pulses to 8 MHz, %0d to 64 MHz", e8, e64));
    program_cc('{stop8: 1'b1, stop64: 1'b1, dbg_clk64: 1'b1, default: 1'b0});
    instr = I_DBG_SCAN;
    e64 = 0; e8 = 0;
    dr_shift('0, 11, dout);
    #20;
    check(e64 == 11 && e8 == 0, $sformatf("debug scan: %0d TCK pulses to 64 MHz", e64));
    instr = I_BYPASS;
    // the breakpoint stop holds after the request goes away
    dbg_stop_req = 0;
    #100;
    count(800, a, b);
    check(a == 0 && b == 0, "breakpoint stop holds until a functional reset");
    // stop only the 8 MHz domain; DBG_RESET first clears the hold
    program_cc('{stop8: 1'b1, default: 1'b0});
    dbg_reset = 1; #100 dbg_reset = 0;
    wait (rst8_n);
    dbg_stop_req = 1;
    #100;
    count(800, a, b);
    check(a == 200 && b == 0, $sformatf("stop only 8 MHz (%0d, %0d)", a, b));
    // DBG_RESET: clocks restart; the stop is ignored while the internal reset is low
    program_cc('{stop8: 1'b1, stop64: 1'b1, default: 1'b0});
    dbg_reset = 1;
    #100;
    check(!rst_pin_o, "internal reset asserted by DBG_RESET");
    dbg_reset = 0;
    e8 = 0;
    wait (rst8_n);
    check(e8 >= 1, "8 MHz clock pulses while internal reset active");
    #100;
    count(800, a, b);
    check(a == 0 && b == 0, "stopped again after internal reset");
    dbg_stop_req = 0;
    dbg_reset = 1; #100 dbg_reset = 0;
    wait (rst8_n);
    // test mode
    test_mode = 1;
    count(400, a, b);
    check(a == 0 && b == 0, "test clock gated until enabled");
    instr = I_PROGRAM_TCB;
    begin
      ltcb_t t;
      t = '0;
      t.tck_en = 1'b1;
      dr_shift(1024'(t), LTCB_W, dout);
    end
    dr_update();
    instr = I_BYPASS;
    count(0, a, b);
    for (int k = 0; k < 20; k++) tck_pulse();
    check(e64 >= 19 && e8 >= 19 && e64 <= 21, $sformatf("test clock pulses %0d %0d", e64, e8));
    // scan chains: flush, then marker
    test_se = 1;
    scan_si = 2'b00;
    for (int k = 0; k < 20; k++) tck_pulse();
    scan_si = 2'b11;
    tck_pulse();
    scan_si = 2'b00;
    begin
      int l0, l1;
      l0 = 0; l1 = 0;
      for (int k = 1; k < 20; k++) begin
        if (scan_so[0] && l0 == 0) l0 = k;
        if (scan_so[1] && l1 == 0) l1 = k;
        tck_pulse();
      end
      check(l0 == 6, $sformatf("controller chain length %0d", l0));
      check(l1 == 2 + CC_W, $sformatf("wrapper + CC-TPR chain length %0d", l1));
    end
    finish_tb();
  end
endmodule
