// demod_core: digital filter and GFSK demodulator of the receiver.
//
// Data path: the I and Q sigma-delta bit streams (64 MHz) are decimated by
// the CIC filters to 8 MHz, rotated by the rotating CORDIC through the
// NCO angle (500 kHz low IF down to 0 Hz), filtered by the matched
// filters, turned into a phase by the vectoring CORDIC, differentiated to
// instantaneous frequency, and equalized by the DFE into an 8x over-
// sampled bit stream. The frequency loop integrates the differentiator
// output and adds it to the default word -256 to steer the NCO. This chain
// of blocks follows the chip description; their internals are this
// design's own (see each block).
//
// Observation points for the breakpoint modules (this design's choice of
// where A..E sit): A/B = matched filter I/Q (20 bits), C = phase, D =
// instantaneous frequency, E = DFE soft output (12 bits).
//
// Scan: three chains, as the chip description gives for this core.
//   chain 0 (8 MHz):  CIC combs -> NCO -> rotating CORDIC -> matched filter
//   chain 1 (8 MHz):  vectoring CORDIC -> differentiator -> loop -> DFE
//   chain 2 (64 MHz): CIC integrators
// se8 shifts chains 0 and 1, se64 chain 2.
// Reset: synchronous, active-low rst_n (the internal reset from the
// clock and reset controller).
module demod_core
  import rto7_pkg::*;
(
  input  logic clk64,
  input  logic clk8,
  input  logic rst_n,
  input  logic id,
  input  logic qd,
  input  logic se8,
  input  logic se64,
  input  logic [2:0] si,
  output logic [2:0] so,
  output logic bit_o,
  output logic signed [AB_W-1:0] pt_a,
  output logic signed [AB_W-1:0] pt_b,
  output logic signed [PH_W-1:0] pt_c,
  output logic signed [PH_W-1:0] pt_d,
  output logic signed [PH_W-1:0] pt_e
);
  logic signed [AB_W-1:0] ci, cq, ri, rq;
  logic [PH_W-1:0] ang;
  logic signed [PH_W-1:0] nco_f;
  logic s_cic, s_nco, s_rot, s_vec, s_dif, s_lp;

  cic_decim u_cic (.clk64, .clk8, .rst_n, .d_i(id), .d_q(qd),
                   .se64, .si64(si[2]), .so64(so[2]),
                   .se8, .si8(si[0]), .so8(s_cic), .i_o(ci), .q_o(cq));

  nco u_nco (.clk(clk8), .rst_n, .se(se8), .si(s_cic), .so(s_nco),
             .freq(nco_f), .phase(ang));

  cordic_rot u_rot (.clk(clk8), .rst_n, .se(se8), .si(s_nco), .so(s_rot),
                    .i_in(ci), .q_in(cq), .angle(ang), .i_out(ri), .q_out(rq));

  matched_filter u_mf (.clk(clk8), .rst_n, .se(se8), .si(s_rot), .so(so[0]),
                       .i_in(ri), .q_in(rq), .i_out(pt_a), .q_out(pt_b));

  cordic_vec u_vec (.clk(clk8), .rst_n, .se(se8), .si(si[1]), .so(s_vec),
                    .i_in(pt_a), .q_in(pt_b), .phase(pt_c));

  fm_diff u_dif (.clk(clk8), .rst_n, .se(se8), .si(s_vec), .so(s_dif),
                 .phase(pt_c), .freq(pt_d));

  freq_loop u_lp (.clk(clk8), .rst_n, .se(se8), .si(s_dif), .so(s_lp),
                  .freq_in(pt_d), .err(), .nco_freq(nco_f));

  dfe u_dfe (.clk(clk8), .rst_n, .se(se8), .si(s_lp), .so(so[1]),
             .x(pt_d), .y(pt_e), .bit_o);
endmodule
