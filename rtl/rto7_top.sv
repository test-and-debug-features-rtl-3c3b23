// rto7_top: digital test and debug top level of the RTO7 receiver chip.
//
// Ties together, as the chip's test and debug hierarchy does: the IEEE
// 1149.1 TAP controller, the boundary scan register on the digital pins,
// the global TCB, the digital controller core (clock and reset control,
// application settings) in its test shell, and the demodulator core in
// its debug and test shells. All test and debug registers are TAP data
// registers:
//   PROGRAM_TCB     global TCB -> controller TCB -> demodulator TCB (12 bits)
//   PROGRAM_STATUS  application settings register (32 bits)
//   PROGRAM_DBG_CC  CC-TPR (6 bits)
//   PROGRAM_DBG_AC  AC-TPR (2 bits)
//   PROGRAM_DBG_BC  BC-TPR (204 bits)
//   DBG_SCAN        debug chain selected by the AC-TPR
//   DBG_RESET       functional reset while current (bypass register)
//   EXTEST/SAMPLE   boundary scan register (7 bits)
// A breakpoint in the demodulator stops the on-chip clocks; the state of
// the stopped chip can then be shifted out on TDO (state dump).
//
// Four scan chains reach the pins in test mode (global TCB bit test_mode),
// all shifting while TDI is high (TDI serves as scan enable in test mode)
// and clocked by TCK:
//   scan 0, 1: demodulator chains 0 and 1 (8 MHz domain)
//   scan 2: demodulator chain 2 (64 MHz domain) -> controller chain
//   scan 3: demodulator wrapper chain -> controller wrapper chain -> CC-TPR
// Pin counts, the chain concatenation and the TCB chain order follow the
// chip description where it gives them and are otherwise this design's.
// id/qd are the sigma-delta ADC bit streams and app_q the settings for the
// analog and RF parts, both internal to the chip.
module rto7_top
  import rto7_pkg::*;
(
  input  logic tck,
  input  logic tms,
  input  logic tdi,
  input  logic trst_n,
  output logic tdo,
  output logic tdo_en,
  input  logic clk64,
  input  logic rst_n,
  input  logic id,
  input  logic qd,
  input  logic as_sclk,
  input  logic as_sdata,
  input  logic as_sen,
  input  logic as_ld,
  output logic bit_out,
  output logic clk8_out,
  output logic rst_out,
  input  logic [3:0] scan_in,
  output logic [3:0] scan_out,
  output logic [APP_W-1:0] app_q
);
  instr_e  instr;
  dr_ctl_t dr_ctl;
  gtcb_t   gtcb;
  logic dr_tdo, dbg_reset, test_mode, test_se;
  logic bsr_so, gtcb_so, ctcb_so, dtcb_so, cc_so, app_so, ac_so, bc_so, dbg_so;
  logic [3:0] core_in;
  logic [2:0] pin_out;
  logic clk64_g, clk8_g, rst8_n, clk8_pin, rst_pin_o, core_bit, stop_req;
  logic [1:0] c_si, c_so;
  logic [3:0] d_si, d_so;

  tap_ctrl u_tap (.tck, .trst_n, .tms, .tdi, .tdo, .tdo_en, .dr_tdo, .instr,
                  .dr_ctl, .state(), .dbg_reset);

  bsr #(.NI(4), .NO(3)) u_bsr (
    .tck, .trst_n, .sel(instr == I_SAMPLE || instr == I_EXTEST),
    .extest(instr == I_EXTEST || gtcb.bs_extest), .dr_ctl, .tdi, .so(bsr_so),
    .pin_in({as_ld, as_sen, as_sdata, as_sclk}), .core_in,
    .core_out({rst_pin_o, clk8_pin, core_bit}), .pin_out);

  assign {rst_out, clk8_out, bit_out} = pin_out;

  tcb #(.W(GTCB_W)) u_gtcb (.tck, .trst_n, .sel(instr == I_PROGRAM_TCB), .dr_ctl,
                            .tdi, .so(gtcb_so), .cap_val('0), .q(gtcb));

  assign test_mode = gtcb.test_mode;
  assign test_se   = test_mode & tdi;

  assign c_si = {d_so[3], d_so[2]};
  assign d_si = scan_in;
  assign scan_out = {c_so[1], c_so[0], d_so[1], d_so[0]};

  dig_ctrl_shell u_ctrl (
    .clk64_in(clk64), .rst_pin_n(rst_n), .tck, .trst_n, .tdi, .instr, .dr_ctl,
    .dbg_reset, .tcb_si(gtcb_so), .tcb_so(ctcb_so), .cc_so, .app_so,
    .test_mode, .test_se, .scan_si(c_si), .scan_so(c_so),
    .dbg_stop_req(stop_req),
    .as_sclk(core_in[0]), .as_sdata(core_in[1]), .as_sen(core_in[2]), .as_ld(core_in[3]),
    .app_q, .clk64_g, .clk8_g, .rst8_n, .clk8_pin, .rst_pin_o);

  demod_shell u_demod (
    .clk64(clk64_g), .clk8(clk8_g), .rst_n(rst8_n), .tck, .trst_n, .tdi, .instr, .dr_ctl,
    .tcb_si(ctcb_so), .tcb_so(dtcb_so), .id, .qd, .bit_o(core_bit),
    .test_mode, .test_se, .scan_si(d_si), .scan_so(d_so),
    .dbg_so, .ac_so, .bc_so, .dbg_stop_req(stop_req));

  always_comb
    unique case (instr)
      I_EXTEST, I_SAMPLE: dr_tdo = bsr_so;
      I_PROGRAM_TCB:      dr_tdo = dtcb_so;
      I_PROGRAM_STATUS:   dr_tdo = app_so;
      I_PROGRAM_DBG_CC:   dr_tdo = cc_so;
      I_PROGRAM_DBG_AC:   dr_tdo = ac_so;
      I_PROGRAM_DBG_BC:   dr_tdo = bc_so;
      I_DBG_SCAN:         dr_tdo = dbg_so;
      default:            dr_tdo = 1'b0;
    endcase
endmodule
