// cc_tpr: clock control test point register of the digital controller.
//
// A TAP data register (instruction PROGRAM_DBG_CC) built like a test
// control block: a shift stage and an update stage. The four update bits
// choose which of the two clock domains is stopped on an internal
// breakpoint and which one receives TCK pulses during a debug scan. In
// Capture-DR the shift stage also loads two status bits telling whether
// each domain is currently held, so the debugger can see that a breakpoint
// was hit. The register's purpose follows the chip description; the field
// layout (rto7_pkg::cc_t) and the status bits are this design's choice.
// After TRST_N both domains are set to stop on a breakpoint and no debug
// clock is enabled.
//
// Timing: rising edge of TCK; asynchronous reset by TRST_N.
module cc_tpr
  import rto7_pkg::*;
(
  input  logic    tck,
  input  logic    trst_n,
  input  logic    sel,       // current instruction is PROGRAM_DBG_CC
  input  dr_ctl_t dr_ctl,
  input  logic    tdi,
  output logic    so,
  input  logic    stopped8,
  input  logic    stopped64,
  output cc_t     cc
);
  localparam cc_t RST = '{stop8: 1'b1, stop64: 1'b1, default: 1'b0};
  cc_t sh;

  always_ff @(posedge tck or negedge trst_n)
    if (!trst_n) sh <= RST;
    else if (sel && dr_ctl.capture) begin
      sh           <= cc;
      sh.stopped8  <= stopped8;
      sh.stopped64 <= stopped64;
    end else if (sel && dr_ctl.shift) sh <= cc_t'({tdi, sh[CC_W-1:1]});

  always_ff @(posedge tck or negedge trst_n)
    if (!trst_n) cc <= RST;
    else if (sel && dr_ctl.update) begin
      cc           <= sh;
      cc.stopped8  <= 1'b0;   // status bits are observe-only
      cc.stopped64 <= 1'b0;
    end

  assign so = sh[0];
endmodule
