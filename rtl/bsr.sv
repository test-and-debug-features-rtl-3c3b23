// bsr: IEEE 1149.1 boundary scan register for the digital chip pins.
//
// One boundary cell per digital input pin (NI) and output pin (NO). Each
// cell has a capture/shift stage and an update stage. In Capture-DR
// (SAMPLE or EXTEST selected) the shift stages load the pin values: input
// pins as they arrive, output pins as the core drives them. In Shift-DR
// the chain shifts from tdi towards so, input cells first. In Update-DR
// the update stage takes the shifted value. With extest set, output pins
// are driven from the update stages instead of the core. Input cells never
// override the core side (no INTEST), as 1149.1 allows. The chip has
// boundary scan cells on its pins; the cell design and the count of
// wrapped pins are this design's choice.
//
// Timing: rising edge of TCK; TRST_N resets the update stages to 0.
module bsr
  import rto7_pkg::*;
#(
  parameter int unsigned NI = 4,
  parameter int unsigned NO = 3
) (
  input  logic          tck,
  input  logic          trst_n,
  input  logic          sel,     // SAMPLE or EXTEST is the current instruction
  input  logic          extest,
  input  dr_ctl_t       dr_ctl,
  input  logic          tdi,
  output logic          so,
  input  logic [NI-1:0] pin_in,
  output logic [NI-1:0] core_in,
  input  logic [NO-1:0] core_out,
  output logic [NO-1:0] pin_out
);
  localparam int unsigned N = NI + NO;
  logic [N-1:0] sh, upd;

  always_ff @(posedge tck or negedge trst_n)
    if (!trst_n) sh <= '0;
    else if (sel && dr_ctl.capture) sh <= {core_out, pin_in};
    else if (sel && dr_ctl.shift)   sh <= {sh[N-2:0], tdi};

  always_ff @(posedge tck or negedge trst_n)
    if (!trst_n) upd <= '0;
    else if (sel && dr_ctl.update) upd <= sh;

  assign so      = sh[N-1];
  assign core_in = pin_in;
  assign pin_out = extest ? upd[N-1:NI] : core_out;
endmodule
