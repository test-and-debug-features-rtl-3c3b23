// debug_shell: debug shell around the demodulator core.
//
// Contents, as the chip description lists them: the access control TPR
// (AC-TPR, selects the debug chain), the breakpoint control TPR (BC-TPR,
// references in, flags and counters out), a debug bypass register,
// the chain multiplexers and an anti-skew element. It also holds the five
// breakpoint modules (A, B range type; C, D, E compare type) and the OR
// gate that merges their requests into dbg_stop_req for the clock
// controller, which stops the clocks at once.
//
// Debug chains (selected by the AC-TPR, entered from TDI, left on dbg_so):
//   8 MHz chain  = core chain 0, anti-skew flip-flop, core chain 1
//   64 MHz chain = core chain 2
//   bypass       = one TCK flip-flop that shifts only in Shift-DR of
//                  DBG_SCAN, so it holds its value otherwise.
// The domain clocks deliver TCK pulses during a debug scan (clock
// controller); dbg_se, from the demodulator's local TCB, is the debug
// scan enable, independent of the TAP pins. In test mode (test_mode) the
// three core chains are connected to scan_si/scan_so instead and shift
// with test_se. The 8 MHz chain order and the falling-edge anti-skew
// flip-flop are this design's choices.
module debug_shell
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
  input  logic    id,
  input  logic    qd,
  output logic    bit_o,
  input  logic    test_mode,
  input  logic    test_se,
  input  logic [2:0] scan_si,
  output logic [2:0] scan_so,
  input  logic    dbg_se,
  output logic    dbg_so,
  output logic    ac_so,
  output logic    bc_so,
  output logic    dbg_stop_req
);
  ac_sel_e ac;
  bc_ctl_t bc_ctl;
  bc_obs_t bc_obs;
  logic [2:0] core_si, core_so;
  logic se, lockup_q, byp_q;
  logic [4:0] req;
  logic signed [AB_W-1:0] pa, pb;
  logic signed [PH_W-1:0] pc, pd, pe;

  ac_tpr u_ac (.tck, .trst_n, .sel(instr == I_PROGRAM_DBG_AC), .dr_ctl, .tdi,
               .so(ac_so), .ac);

  bc_tpr u_bc (.tck, .trst_n, .sel(instr == I_PROGRAM_DBG_BC), .dr_ctl, .tdi,
               .so(bc_so), .obs(bc_obs), .ctl(bc_ctl));

  assign se = test_mode ? test_se : dbg_se;

  // Anti-skew element between the two 8 MHz chain segments.
  always_ff @(negedge clk8) lockup_q <= core_so[0];

  always_comb
    if (test_mode) core_si = scan_si;
    else           core_si = {tdi, lockup_q, tdi};

  demod_core u_core (.clk64, .clk8, .rst_n, .id, .qd, .se8(se), .se64(se),
                     .si(core_si), .so(core_so), .bit_o,
                     .pt_a(pa), .pt_b(pb), .pt_c(pc), .pt_d(pd), .pt_e(pe));

  assign scan_so = core_so;

  // Holdable debug bypass register.
  always_ff @(posedge tck or negedge trst_n)
    if (!trst_n) byp_q <= 1'b0;
    else if (instr == I_DBG_SCAN && dr_ctl.shift) byp_q <= tdi;

  always_comb
    unique case (ac)
      AC_CHAIN8:  dbg_so = core_so[1];
      AC_CHAIN64: dbg_so = core_so[2];
      default:    dbg_so = byp_q;
    endcase

  bp_range u_bpa (.clk(clk8), .rst_n, .din(pa), .ctl(bc_ctl.ab[0]),  .obs(bc_obs.ab[0]),  .stop_req(req[0]));
  bp_range u_bpb (.clk(clk8), .rst_n, .din(pb), .ctl(bc_ctl.ab[1]),  .obs(bc_obs.ab[1]),  .stop_req(req[1]));
  bp_cmp   u_bpc (.clk(clk8), .rst_n, .din(pc), .ctl(bc_ctl.cde[0]), .obs(bc_obs.cde[0]), .stop_req(req[2]));
  bp_cmp   u_bpd (.clk(clk8), .rst_n, .din(pd), .ctl(bc_ctl.cde[1]), .obs(bc_obs.cde[1]), .stop_req(req[3]));
  bp_cmp   u_bpe (.clk(clk8), .rst_n, .din(pe), .ctl(bc_ctl.cde[2]), .obs(bc_obs.cde[2]), .stop_req(req[4]));

  assign dbg_stop_req = |req;
endmodule
