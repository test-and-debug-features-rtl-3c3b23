// cordic_vec: vectoring CORDIC of the FM demodulator.
//
// Computes the phase of the complex sample (i_in, q_in) in units of
// 1/4096 turn (two's complement, -2048 = -1/2 turn). A sample in the left
// half plane is negated and half a turn is added to the result; then NIT
// micro-rotations drive the imaginary part to zero while accumulating the
// angle. The role follows the chip description; the unrolled structure,
// iteration count, internal width and rounding are this design's choices.
//
// Timing: combinational iterations, output registered on the 8 MHz clock
// (one cycle of latency).
// Scan: the phase register is one scan segment (si -> so when se).
// Reset: synchronous, active-low, phase 0.
module cordic_vec
  import rto7_pkg::*;
  import cordic_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic se,
  input  logic si,
  output logic so,
  input  logic signed [AB_W-1:0] i_in,
  input  logic signed [AB_W-1:0] q_in,
  output logic signed [PH_W-1:0] phase
);
  localparam int unsigned XW = AB_W + 2;
  logic signed [PH_W-1:0] ph_d;

  always_comb begin
    logic signed [XW-1:0] x, y, xn;
    logic signed [ZW-1:0] z;
    x = XW'(i_in);
    y = XW'(q_in);
    z = '0;
    if (x < 0) begin
      x = -x;
      y = -y;
      z = signed'(ZW'(1) << (ZW-1));           // half a turn
    end
    for (int k = 0; k < NIT; k++) begin
      if (y >= 0) begin
        xn = x + (y >>> k);
        y  = y - (x >>> k);
        z  = z + signed'(ATAN[k]);
      end else begin
        xn = x - (y >>> k);
        y  = y + (x >>> k);
        z  = z - signed'(ATAN[k]);
      end
      x = xn;
    end
    z    = z + signed'(ZW'(1) << (ZW-PH_W-1)); // round to 12 bits
    ph_d = z[ZW-1 -: PH_W];
  end

  always_ff @(posedge clk)
    if (se)          phase <= {phase[PH_W-2:0], si};
    else if (!rst_n) phase <= '0;
    else             phase <= ph_d;

  assign so = phase[PH_W-1];
endmodule
