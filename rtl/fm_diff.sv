// fm_diff: phase differentiator of the FM demodulator.
//
// Subtracts the previous phase from the current one, modulo one turn, to
// get the instantaneous frequency in units of 1/4096 turn per 8 MHz
// sample (256 = 500 kHz). Differentiating the vectoring CORDIC's phase
// follows the chip description; the first-difference form is this
// design's choice.
//
// Timing: registered; freq reflects the phase step seen one cycle earlier.
// Scan: previous phase and output form one scan segment (si -> so when se).
// Reset: synchronous, active-low.
module fm_diff
  import rto7_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic se,
  input  logic si,
  output logic so,
  input  logic signed [PH_W-1:0] phase,
  output logic signed [PH_W-1:0] freq
);
  typedef struct packed {
    logic [PH_W-1:0] prev;
    logic [PH_W-1:0] d;
  } st_t;
  st_t st;

  always_ff @(posedge clk)
    if (se)          st <= st_t'({st[$bits(st_t)-2:0], si});
    else if (!rst_n) st <= '0;
    else begin
      st.prev <= phase;
      st.d    <= phase - st.prev;
    end

  assign so   = st[$bits(st_t)-1];
  assign freq = st.d;
endmodule
