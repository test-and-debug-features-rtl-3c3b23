// cordic_rot: rotating CORDIC of the demodulator.
//
// Rotates the complex sample (i_in, q_in) by the angle given by the NCO,
// which shifts the 500 kHz low-IF signal down to 0 Hz and removes phase
// offsets. Angles are in units of 1/4096 turn. An angle in the left half
// plane is first reduced by half a turn (negating both inputs); the rest,
// within +-1/4 turn, is resolved by NIT shift-and-add micro-rotations. The
// rotator role follows the chip description; the unrolled structure, the
// iteration count, the internal width (AB_W+2) and the uncompensated gain
// of about 1.647 are this design's choices.
//
// Timing: the micro-rotations are combinational, the result is registered
// on the 8 MHz clock: one cycle of latency.
// Scan: the two output registers form one scan segment (si -> so when se).
// Reset: synchronous, active-low, outputs 0.
module cordic_rot
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
  input  logic [PH_W-1:0]        angle,
  output logic signed [AB_W-1:0] i_out,
  output logic signed [AB_W-1:0] q_out
);
  localparam int unsigned XW = AB_W + 2;
  typedef struct packed {
    logic signed [AB_W-1:0] i;
    logic signed [AB_W-1:0] q;
  } st_t;
  st_t st, st_d;

  always_comb begin
    logic signed [XW-1:0] x, y, xn;
    logic signed [ZW-1:0] z;
    x = XW'(i_in);
    y = XW'(q_in);
    z = signed'({angle, {(ZW-PH_W){1'b0}}});
    if (angle[PH_W-1] != angle[PH_W-2]) begin   // beyond +-1/4 turn
      x = -x;
      y = -y;
      z = z + signed'(ZW'(1) << (ZW-1));       // subtract half a turn
    end
    for (int k = 0; k < NIT; k++) begin
      if (z >= 0) begin
        xn = x - (y >>> k);
        y  = y + (x >>> k);
        z  = z - signed'(ATAN[k]);
      end else begin
        xn = x + (y >>> k);
        y  = y - (x >>> k);
        z  = z + signed'(ATAN[k]);
      end
      x = xn;
    end
    st_d.i = AB_W'(x);
    st_d.q = AB_W'(y);
  end

  always_ff @(posedge clk)
    if (se)          st <= st_t'({st[$bits(st_t)-2:0], si});
    else if (!rst_n) st <= '0;
    else             st <= st_d;

  assign so    = st[$bits(st_t)-1];
  assign i_out = st.i;
  assign q_out = st.q;
endmodule
