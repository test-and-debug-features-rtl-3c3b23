// bc_tpr: breakpoint control test point register (instruction
// PROGRAM_DBG_BC), 204 bits.
//
// It gives the five breakpoint modules their reference values and counter
// enables, and lets the debugger read back their flags and counters. The
// register is one 204-bit shift stage. The upper 124 bits are control
// cells with an update stage behind them (rto7_pkg::bc_ctl_t); the lower
// 80 bits are observe cells (rto7_pkg::bc_obs_t) that load the breakpoint
// flags and counters in Capture-DR.
//
// Each shift cell sits behind two multiplexers: a hold multiplexer that
// keeps the cell's value, and behind it a capture multiplexer that picks
// the observed value or the shift input. Hold is released whenever the
// register is selected and the TAP is in Capture-DR or Shift-DR, so a
// capture really loads the observed values (hold and capture active
// together in Capture-DR). Control cells capture their own update value,
// so a read-back shows the programmed references.
//
// The 204-bit length and the capture/hold structure follow the chip
// description; the field order is this design's choice. Reset (TRST_N)
// loads rto7_pkg::bc_ctl_reset(): every breakpoint counts, none stops a clock.
//
// Timing: rising edge of TCK. Shifts LSB first: so is bit 0.
module bc_tpr
  import rto7_pkg::*;
(
  input  logic     tck,
  input  logic     trst_n,
  input  logic     sel,
  input  dr_ctl_t  dr_ctl,
  input  logic     tdi,
  output logic     so,
  input  bc_obs_t  obs,
  output bc_ctl_t  ctl
);
  logic [BC_W-1:0] sh, sh_d;
  logic hold, capture;

  assign hold    = !(sel && (dr_ctl.capture || dr_ctl.shift));
  assign capture = dr_ctl.capture;

  always_comb begin
    logic [BC_W-1:0] cap_or_shift;
    cap_or_shift = capture ? {ctl, obs} : {tdi, sh[BC_W-1:1]};
    sh_d = hold ? sh : cap_or_shift;
  end

  always_ff @(posedge tck or negedge trst_n)
    if (!trst_n) sh <= {bc_ctl_reset(), {BC_OBS_W{1'b0}}};
    else         sh <= sh_d;

  always_ff @(posedge tck or negedge trst_n)
    if (!trst_n) ctl <= bc_ctl_reset();
    else if (sel && dr_ctl.update) ctl <= bc_ctl_t'(sh[BC_W-1:BC_OBS_W]);

  assign so = sh[0];
endmodule
