// app_settings_reg: serial application settings register.
//
// Holds the settings of the digital, analog and RF parts of the receiver
// (bit 0 is the functional power-down bit, which gates both on-chip
// clocks). It is a shift stage and an update stage that can be written
// from two sides: directly from chip pins (serial clock as_sclk, data
// as_sdata, shift enable as_sen, load as_ld), or from the TAP when the
// PROGRAM_STATUS instruction is current (tap_sel). tap_sel picks the clock
// and the controls of the side in use. Access from pins and TAP follows
// the chip description; the 32-bit width, the pin protocol and the
// meaning of bits other than power-down are this design's choices.
//
// Timing: rising edge of the selected serial clock; asynchronous reset by
// rst_n (chip reset pin) to all zeros.
module app_settings_reg
  import rto7_pkg::*;
#(
  parameter int unsigned W = APP_W
) (
  input  logic         rst_n,
  input  logic         tap_sel,
  input  logic         tck,
  input  dr_ctl_t      dr_ctl,
  input  logic         tdi,
  input  logic         as_sclk,
  input  logic         as_sdata,
  input  logic         as_sen,
  input  logic         as_ld,
  output logic         so,
  output logic [W-1:0] q
);
  logic sclk, din, sh_en, ld, cap;
  logic [W-1:0] sh;

  assign sclk  = tap_sel ? tck : as_sclk;
  assign din   = tap_sel ? tdi : as_sdata;
  assign sh_en = tap_sel ? dr_ctl.shift  : as_sen;
  assign ld    = tap_sel ? dr_ctl.update : as_ld;
  assign cap   = tap_sel & dr_ctl.capture;

  always_ff @(posedge sclk or negedge rst_n)
    if (!rst_n)     sh <= '0;
    else if (cap)   sh <= q;
    else if (sh_en) sh <= {din, sh[W-1:1]};

  always_ff @(posedge sclk or negedge rst_n)
    if (!rst_n)  q <= '0;
    else if (ld) q <= sh;

  assign so = sh[0];
endmodule
