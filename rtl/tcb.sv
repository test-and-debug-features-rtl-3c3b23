// tcb: test control block, a TAP data register made of a shift stage and
// an update stage.
//
// New control values are shifted in through tdi while sel and Shift-DR
// are active, without disturbing the outputs; in Update-DR the shift stage
// is copied to the update stage, which drives the test control outputs.
// This two-stage structure is the one the chip description gives for all
// test control blocks; the reset value (all outputs low, i.e. functional
// mode) and the LSB-first shift order are this design's choices. The same
// module serves as global TCB and as local TCB of each core, and with a
// capture input (CAPTURE=1) as a control-and-observe test point register.
//
// Timing: shift and update on the rising edge of TCK; TRST_N resets both
// stages asynchronously. so is the LSB of the shift stage.
module tcb
  import rto7_pkg::*;
#(
  parameter int unsigned W = 5,
  parameter logic [W-1:0] RESET_VAL = '0,
  parameter bit CAPTURE = 1'b0
) (
  input  logic         tck,
  input  logic         trst_n,
  input  logic         sel,
  input  dr_ctl_t      dr_ctl,
  input  logic         tdi,
  output logic         so,
  input  logic [W-1:0] cap_val,
  output logic [W-1:0] q
);
  logic [W-1:0] sh;

  always_ff @(posedge tck or negedge trst_n)
    if (!trst_n) sh <= RESET_VAL;
    else if (sel && dr_ctl.capture) sh <= CAPTURE ? cap_val : q;
    else if (sel && dr_ctl.shift)   sh <= {tdi, sh[W-1:1]};

  always_ff @(posedge tck or negedge trst_n)
    if (!trst_n) q <= RESET_VAL;
    else if (sel && dr_ctl.update) q <= sh;

  assign so = sh[0];
endmodule
