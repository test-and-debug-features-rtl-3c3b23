// demod_shell: test shell of the demodulator core.
//
// Wraps the debug shell (and with it the demodulator) for structural
// test: a local TCB (on the PROGRAM_TCB chain) with the wrapper modes,
// the core bypass select, the test clock enable and the debug scan
// enable; a wrapper scan chain isolating the core's data inputs (I_d,
// Q_d) and its data output (the demodulated bit); and a one-bit core
// bypass that can replace the wrapper chain in the test scan path. The
// debug signals from the TAP, the debug chain and the breakpoint stop
// request have no wrapper cells, as in the chip description.
//
// Test scan ports: scan_si/scan_so [2:0] are the core's three internal
// chains; [3] is the wrapper chain (or the bypass). All shift with test_se
// on the domain clocks, which the clock controller turns into TCK in test
// mode. The wrapper chain and bypass are clocked by the 8 MHz domain clock.
module demod_shell
  import rto7_pkg::*;
(
  input  logic    clk64,
  input  logic    clk8,
  input  logic    rst_n,
  input  logic    tck,
  input  logic    trst_n,
  input  logic    tdi,
  input  instr_e  instr,
  input  dr_ctl_t dr_ctl,
  input  logic    tcb_si,
  output logic    tcb_so,

  input  logic    id,
  input  logic    qd,
  output logic    bit_o,
  input  logic    test_mode,
  input  logic    test_se,
  input  logic [3:0] scan_si,
  output logic [3:0] scan_so,
  output logic    dbg_so,
  output logic    ac_so,
  output logic    bc_so,
  output logic    dbg_stop_req
);
  ltcb_t ltcb;
  logic [1:0] core_in;
  logic core_bit, w_so, byp_q;

  tcb #(.W(LTCB_W)) u_tcb (.tck, .trst_n, .sel(instr == I_PROGRAM_TCB), .dr_ctl,
                           .tdi(tcb_si), .so(tcb_so), .cap_val('0), .q(ltcb));

  wrapper_chain #(.NI(2), .NO(1)) u_wrap (
    .tclk(clk8), .se(test_se), .si(scan_si[3]), .so(w_so),
    .intest(ltcb.intest), .extest(ltcb.extest),
    .pin_in({qd, id}), .core_in(core_in), .core_out(core_bit), .pin_out(bit_o));

  always_ff @(posedge clk8) byp_q <= scan_si[3];
  assign scan_so[3] = ltcb.bypass ? byp_q : w_so;

  debug_shell u_dbg (
    .clk64, .clk8, .rst_n, .tck, .trst_n, .tdi, .instr, .dr_ctl,
    .id(core_in[0]), .qd(core_in[1]), .bit_o(core_bit),
    .test_mode, .test_se, .scan_si(scan_si[2:0]), .scan_so(scan_so[2:0]),
    .dbg_se(ltcb.dbg_se), .dbg_so, .ac_so, .bc_so, .dbg_stop_req);
endmodule
