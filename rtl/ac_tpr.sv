// ac_tpr: access control test point register of the demodulator debug
// shell (instruction PROGRAM_DBG_AC).
//
// A 2-bit holdable shift register with no capture or update stage: its
// shift stages drive the debug chain selection directly, and they hold
// their value whenever the instruction is not selected or the TAP is not
// in Shift-DR. Code 1 selects the concatenated 8 MHz chain, code 2 the
// 64 MHz chain, codes 0 and 3 the debug bypass register. The 2-bit size
// and the absence of capture/update follow the chip description; the
// encoding is this design's choice. Reset (TRST_N) selects the bypass.
//
// Timing: rising edge of TCK.
module ac_tpr
  import rto7_pkg::*;
(
  input  logic    tck,
  input  logic    trst_n,
  input  logic    sel,
  input  dr_ctl_t dr_ctl,
  input  logic    tdi,
  output logic    so,
  output ac_sel_e ac
);
  logic [1:0] sh;
  always_ff @(posedge tck or negedge trst_n)
    if (!trst_n) sh <= 2'b00;
    else if (sel && dr_ctl.shift) sh <= {tdi, sh[1]};

  assign ac = ac_sel_e'(sh);
  assign so = sh[0];
endmodule
