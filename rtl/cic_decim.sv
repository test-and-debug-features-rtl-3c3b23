// cic_decim: cascaded integrator-comb decimation filters for the I and Q
// sigma-delta bit streams, 64 MHz in, 8 MHz out.
//
// Each 1-bit input is read as +1 (1) or -1 (0). ORDER integrators per
// channel run on the 64 MHz clock; their last stage is passed to the 8 MHz
// domain through falling-edge (anti-skew) flip-flops, sampled once per
// 8 MHz cycle, and differenced by ORDER combs with unit delay. The CIC
// gain is R**ORDER, so a constant +1 stream gives +512 (ORDER 3, R 8). The
// result is sign-extended and scaled up by SHIFT bits onto the 20-bit
// datapath. Decimation by 8 with CIC filters between the 64 MHz and 8 MHz
// domains follows the chip description; the order, register widths and
// scaling are this design's choices. Wrap-around arithmetic (width
// CW = ORDER*log2(R)+2) makes the integrator overflow harmless.
//
// Scan: the integrators form the 64 MHz chain (si64 -> so64, se64); the
// sample and comb registers are part of an 8 MHz chain (si8 -> so8, se8).
// The anti-skew flip-flops are not scanned.
// Reset: synchronous, active-low rst_n, in both domains.
// Latency: an input bit reaches the output within two 8 MHz cycles.
module cic_decim
  import rto7_pkg::*;
#(
  parameter int unsigned ORDER = 3,
  parameter int unsigned LOG2R = 3,
  parameter int unsigned SHIFT = 8
) (
  input  logic clk64,
  input  logic clk8,
  input  logic rst_n,
  input  logic d_i,
  input  logic d_q,
  input  logic se64,
  input  logic si64,
  output logic so64,
  input  logic se8,
  input  logic si8,
  output logic so8,
  output logic signed [AB_W-1:0] i_o,
  output logic signed [AB_W-1:0] q_o
);
  localparam int unsigned CW = ORDER*LOG2R + 2;

  typedef struct packed {
    logic [ORDER-1:0][CW-1:0] ii;
    logic [ORDER-1:0][CW-1:0] iq;
  } st64_t;

  typedef struct packed {
    logic [CW-1:0]            si_, sq_;   // decimated samples
    logic [ORDER-1:0][CW-1:0] di, dq;     // comb delays
    logic [CW-1:0]            oi, oq;     // outputs
  } st8_t;

  st64_t s64, s64_d;
  st8_t  s8, s8_d;
  logic [CW-1:0] as_i, as_q;

  always_comb begin
    logic [CW-1:0] xi, xq;
    xi = d_i ? CW'(1) : {CW{1'b1}};
    xq = d_q ? CW'(1) : {CW{1'b1}};
    for (int k = 0; k < ORDER; k++) begin
      s64_d.ii[k] = s64.ii[k] + ((k == 0) ? xi : s64.ii[k-1]);
      s64_d.iq[k] = s64.iq[k] + ((k == 0) ? xq : s64.iq[k-1]);
    end
  end

  always_ff @(posedge clk64)
    if (se64)        s64 <= st64_t'({s64[$bits(st64_t)-2:0], si64});
    else if (!rst_n) s64 <= '0;
    else             s64 <= s64_d;

  // Anti-skew elements on the 64 MHz -> 8 MHz crossing.
  always_ff @(negedge clk64) begin
    as_i <= s64.ii[ORDER-1];
    as_q <= s64.iq[ORDER-1];
  end

  always_comb begin
    logic [CW-1:0] ci, cq;
    s8_d     = s8;
    s8_d.si_ = as_i;
    s8_d.sq_ = as_q;
    ci = s8.si_;
    cq = s8.sq_;
    for (int k = 0; k < ORDER; k++) begin
      s8_d.di[k] = ci;
      s8_d.dq[k] = cq;
      ci = ci - s8.di[k];
      cq = cq - s8.dq[k];
    end
    s8_d.oi = ci;
    s8_d.oq = cq;
  end

  always_ff @(posedge clk8)
    if (se8)         s8 <= st8_t'({s8[$bits(st8_t)-2:0], si8});
    else if (!rst_n) s8 <= '0;
    else             s8 <= s8_d;

  assign so64 = s64[$bits(st64_t)-1];
  assign so8  = s8[$bits(st8_t)-1];
  assign i_o  = AB_W'(signed'(s8.oi)) <<< SHIFT;
  assign q_o  = AB_W'(signed'(s8.oq)) <<< SHIFT;
endmodule
