// dig_ctrl_shell: digital controller core (clock and reset control) in its
// test shell.
//
// Functional part: the clock generator/divider makes the 64 MHz and
// 8 MHz clocks and the internal demodulator reset from the 64 MHz input
// and the functional reset. The functional reset comes from the reset pin
// or from the TAP (DBG_RESET instruction). Two clock control slices gate
// each domain clock: it stops when the power-down bit (bit 0 of the
// application settings register) is set, or when the breakpoint stop
// request arrives and the CC-TPR enables stopping that domain; a
// breakpoint stop holds until the next functional reset. During a
// debug scan (DBG_SCAN, Shift-DR) a stopped domain whose CC-TPR debug
// clock bit is set receives TCK pulses. In test mode every domain runs on
// the gated test clock (TCK). The 8 MHz clock and the internal reset are
// also brought out for observation on pins.
//
// While the internal reset is asserted the breakpoint stop is ignored,
// so a synchronous reset of the breakpoint modules can always take
// effect after a functional reset; this resolves the start-up race
// between a breakpoint programmed before the reset and the first clock
// pulse after it. This is this design's choice.
//
// Test shell: a local TCB on the PROGRAM_TCB chain; a wrapper chain over
// the stop request input and the internal reset output; in test mode the
// CC-TPR is in series after the wrapper chain (scan_si[1] -> wrapper ->
// CC-TPR -> scan_so[1]); scan_si[0] -> clock generator chain -> scan_so[0].
// Following the chip description, the application settings register's
// TAP controls and its outputs to the analog part have no wrapper cells.
module dig_ctrl_shell
  import rto7_pkg::*;
(
  input  logic    clk64_in,
  input  logic    rst_pin_n,
  input  logic    tck,
  input  logic    trst_n,
  input  logic    tdi,
  input  instr_e  instr,
  input  dr_ctl_t dr_ctl,
  input  logic    dbg_reset,
  input  logic    tcb_si,
  output logic    tcb_so,
  output logic    cc_so,
  output logic    app_so,
  input  logic    test_mode,
  input  logic    test_se,
  input  logic [1:0] scan_si,
  output logic [1:0] scan_so,
  input  logic    dbg_stop_req,
  input  logic    as_sclk,
  input  logic    as_sdata,
  input  logic    as_sen,
  input  logic    as_ld,
  output logic [APP_W-1:0] app_q,
  output logic    clk64_g,
  output logic    clk8_g,
  output logic    rst8_n,
  output logic    clk8_pin,
  output logic    rst_pin_o
);
  ltcb_t   ltcb;
  cc_t     cc;
  dr_ctl_t cc_ctl;
  logic rst_func_n, gen_clk, clk64_o, clk8_o, rst8_core;
  logic stop_in, w_so, cc_sel, cc_tdi, stopped8, stopped64, pd, dbg_scan;

  assign rst_func_n = rst_pin_n & ~dbg_reset;

  tcb #(.W(LTCB_W)) u_tcb (.tck, .trst_n, .sel(instr == I_PROGRAM_TCB), .dr_ctl,
                           .tdi(tcb_si), .so(tcb_so), .cap_val('0), .q(ltcb));

  // Clock generator runs on the test clock in test mode.
  assign gen_clk = test_mode ? tck : clk64_in;

  clk_rst_gen u_gen (.clk64_in(gen_clk), .rst_n(rst_func_n),
                     .se(test_mode & test_se), .si(scan_si[0]), .so(scan_so[0]),
                     .clk64_o, .clk8_o, .rst8_n(rst8_core));

  wrapper_chain #(.NI(1), .NO(1)) u_wrap (
    .tclk(gen_clk), .se(test_se), .si(scan_si[1]), .so(w_so),
    .intest(ltcb.intest), .extest(ltcb.extest),
    .pin_in(dbg_stop_req), .core_in(stop_in), .core_out(rst8_core), .pin_out(rst8_n));

  // CC-TPR: TAP register in application/debug, part of the wrapper chain in test mode.
  assign cc_sel = test_mode | (instr == I_PROGRAM_DBG_CC);
  assign cc_tdi = test_mode ? w_so : tdi;
  assign cc_ctl = test_mode ? '{capture: 1'b0, shift: test_se, update: 1'b0} : dr_ctl;

  cc_tpr u_cc (.tck, .trst_n, .sel(cc_sel), .dr_ctl(cc_ctl), .tdi(cc_tdi), .so(cc_so),
               .stopped8, .stopped64, .cc);
  assign scan_so[1] = cc_so;

  app_settings_reg u_app (.rst_n(rst_pin_n), .tap_sel(instr == I_PROGRAM_STATUS),
                          .tck, .dr_ctl, .tdi, .as_sclk, .as_sdata, .as_sen, .as_ld,
                          .so(app_so), .q(app_q));

  assign pd       = app_q[0];
  assign dbg_scan = (instr == I_DBG_SCAN) && dr_ctl.shift;

  clk_slice u_s64 (.fclk(clk64_o), .tck, .rst_n(rst_func_n), .trst_n,
                   .pd, .bp_stop(stop_in && cc.stop64 && rst8_core),
                   .test_mode, .test_en(ltcb.tck_en), .dbg_en(dbg_scan && cc.dbg_clk64),
                   .clk_o(clk64_g), .stopped(stopped64));

  clk_slice u_s8 (.fclk(clk8_o), .tck, .rst_n(rst_func_n), .trst_n,
                  .pd, .bp_stop(stop_in && cc.stop8 && rst8_core),
                  .test_mode, .test_en(ltcb.tck_en), .dbg_en(dbg_scan && cc.dbg_clk8),
                  .clk_o(clk8_g), .stopped(stopped8));

  assign clk8_pin  = clk8_o;
  assign rst_pin_o = rst8_core;
endmodule
