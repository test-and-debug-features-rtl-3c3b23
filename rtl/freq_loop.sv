// freq_loop: frequency compensation loop filter.
//
// A crystal offset between transmitter and receiver shows up as a DC
// shift of the differentiator output. This block integrates that output
// with gain 2**-K (a first-order loop around NCO and demodulator) and adds
// the resulting loop error to the default frequency word -256 (500 kHz),
// giving the NCO frequency word. In steady state the differentiator's DC
// is driven to zero. The loop structure and the -256 default follow the
// chip description; the gain K, the 8 fraction bits and the sign
// convention (error = minus the filtered frequency) are this design's
// choices.
//
// Timing: registered; err and nco_freq change one cycle after freq_in.
// Scan: the integrator is one scan segment (si -> so when se).
// Reset: synchronous, active-low, loop error 0.
module freq_loop
  import rto7_pkg::*;
#(
  parameter int unsigned K    = 5,
  parameter int unsigned FRAC = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic se,
  input  logic si,
  output logic so,
  input  logic signed [PH_W-1:0] freq_in,
  output logic signed [PH_W-1:0] err,
  output logic signed [PH_W-1:0] nco_freq
);
  localparam int unsigned AW = PH_W + FRAC;
  logic signed [AW-1:0] acc;

  always_ff @(posedge clk)
    if (se)          acc <= {acc[AW-2:0], si};
    else if (!rst_n) acc <= '0;
    else             acc <= acc - (AW'(freq_in) <<< (FRAC - K));

  assign so       = acc[AW-1];
  assign err      = acc[AW-1 -: PH_W];
  assign nco_freq = PH_W'(F_DEFAULT) + err;
endmodule
