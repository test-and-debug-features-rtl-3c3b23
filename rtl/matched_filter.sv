// matched_filter: filters matched to the main impulse response C0(t),
// one for I and one for Q.
//
// The shape of C0(t) is not part of this design's source description, so
// the filter is the simplest pulse-matched filter for 8 samples per
// symbol: the average of the last TAPS samples (a moving sum shifted
// right by log2(TAPS)). Using matched filters after the rotating CORDIC
// follows the chip description; the rectangular taps are this design's
// choice, and changing TAPS changes the pulse length.
//
// Timing: registered on the 8 MHz clock; an input sample is first seen at
// the output one cycle later and stays in the sum for TAPS cycles.
// Scan: delay line and outputs form one scan segment (si -> so when se).
// Reset: synchronous, active-low, everything 0.
module matched_filter
  import rto7_pkg::*;
#(
  parameter int unsigned TAPS = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic se,
  input  logic si,
  output logic so,
  input  logic signed [AB_W-1:0] i_in,
  input  logic signed [AB_W-1:0] q_in,
  output logic signed [AB_W-1:0] i_out,
  output logic signed [AB_W-1:0] q_out
);
  localparam int unsigned SW = AB_W + $clog2(TAPS);
  typedef struct packed {
    logic [TAPS-2:0][AB_W-1:0] di;
    logic [TAPS-2:0][AB_W-1:0] dq;
    logic [AB_W-1:0] oi;
    logic [AB_W-1:0] oq;
  } st_t;
  st_t st, st_d;

  always_comb begin
    logic signed [SW-1:0] si_, sq_;
    si_ = SW'(i_in);
    sq_ = SW'(q_in);
    for (int k = 0; k < TAPS-1; k++) begin
      si_ = si_ + SW'(signed'(st.di[k]));
      sq_ = sq_ + SW'(signed'(st.dq[k]));
    end
    st_d.di = {st.di[TAPS-3:0], i_in};
    st_d.dq = {st.dq[TAPS-3:0], q_in};
    st_d.oi = AB_W'(si_ >>> $clog2(TAPS));
    st_d.oq = AB_W'(sq_ >>> $clog2(TAPS));
  end

  always_ff @(posedge clk)
    if (se)          st <= st_t'({st[$bits(st_t)-2:0], si});
    else if (!rst_n) st <= '0;
    else             st <= st_d;

  assign so    = st[$bits(st_t)-1];
  assign i_out = st.oi;
  assign q_out = st.oq;
endmodule
