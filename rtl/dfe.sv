// dfe: linear decision-feedback equalizer, the last stage of the
// demodulator.
//
// Works on the instantaneous frequency at 8 samples per 1 Mb/s symbol.
// Each sample is corrected by the decision taken one symbol (SPS samples)
// earlier: y = x - (+COEF or -COEF), and the output bit is y >= 0. The
// output is a bit stream 8 times over-sampled, as the chip description
// states; the single feedback tap, its spacing and the coefficient are
// this design's choices.
//
// Timing: registered; y and bit_o follow x by one cycle.
// Scan: decision history, y and bit form one scan segment (si -> so when se).
// Reset: synchronous, active-low.
module dfe
  import rto7_pkg::*;
#(
  parameter int unsigned SPS  = 8,
  parameter int signed   COEF = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic se,
  input  logic si,
  output logic so,
  input  logic signed [PH_W-1:0] x,
  output logic signed [PH_W-1:0] y,
  output logic bit_o
);
  typedef struct packed {
    logic [SPS-1:0]  hist;   // hist[SPS-1] = decision SPS samples ago
    logic [PH_W-1:0] y;
    logic            b;
  } st_t;
  st_t st, st_d;

  always_comb begin
    logic signed [PH_W-1:0] yy;
    yy = x - (st.hist[SPS-1] ? PH_W'(COEF) : PH_W'(-COEF));
    st_d.y    = yy;
    st_d.b    = (yy >= 0);
    st_d.hist = {st.hist[SPS-2:0], (yy >= 0)};
  end

  always_ff @(posedge clk)
    if (se)          st <= st_t'({st[$bits(st_t)-2:0], si});
    else if (!rst_n) st <= '0;
    else             st <= st_d;

  assign so    = st[$bits(st_t)-1];
  assign y     = st.y;
  assign bit_o = st.b;
endmodule
