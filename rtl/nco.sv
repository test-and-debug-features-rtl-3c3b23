// nco: numerically controlled oscillator of the demodulator.
//
// A PH_W-bit phase accumulator that adds the signed frequency word every
// 8 MHz cycle; its value is the rotation angle for the rotating CORDIC, in
// units of 1/2**PH_W of a full turn. With PH_W = 12 the default frequency
// word -256 is -1/16 turn per sample, i.e. -500 kHz at 8 MHz, which is the
// "-256 represents 500 kHz" relation of the chip description. The
// accumulator width is this design's choice.
//
// Scan: the accumulator is one scan segment (si -> so when se).
// Reset: synchronous, active-low; phase 0. The phase leaves the register,
// so a new frequency word affects the phase one cycle later.
module nco
  import rto7_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic se,
  input  logic si,
  output logic so,
  input  logic signed [PH_W-1:0] freq,
  output logic [PH_W-1:0] phase
);
  always_ff @(posedge clk)
    if (se)          phase <= {phase[PH_W-2:0], si};
    else if (!rst_n) phase <= '0;
    else             phase <= phase + freq;

  assign so = phase[PH_W-1];
endmodule
