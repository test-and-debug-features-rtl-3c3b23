// clk_rst_gen: clock generator and divider of the digital controller.
//
// From the 64 MHz functional clock it makes a 64 MHz output clock and an
// 8 MHz clock (divide by 8, 50% duty), both held low during the active-low
// functional reset and both starting with a rising edge after reset is
// released, so they are synchronised to the reset's rising edge. It also
// makes the internal reset of the demodulator, which is released on a
// rising edge of the 8 MHz clock. All flip-flops reset asynchronously, and
// reset release is synchronised (two flip-flops on the 64 MHz clock, two
// on the 8 MHz clock). This behaviour follows the chip description; the
// synchroniser depth is this design's choice.
//
// Scan: the 64 MHz-domain flip-flops (reset synchroniser, divider) form a
// scan chain si -> so, shifted when se is high. The 8 MHz-domain reset
// flip-flops and the falling-edge clock enable are not in the chain.
//
// Timing: clk8 rises two 64 MHz cycles plus one after rst_n rises
// (synchroniser), then every 8 cycles; rst8_n rises on the second
// rising edge of clk8.
module clk_rst_gen (
  input  logic clk64_in,
  input  logic rst_n,
  input  logic se,
  input  logic si,
  output logic so,
  output logic clk64_o,
  output logic clk8_o,
  output logic rst8_n
);
  typedef struct packed {
    logic [1:0] rsync;
    logic [2:0] cnt;
    logic       clk8;
  } st_t;
  st_t st, st_d;
  logic run_q;
  logic [1:0] r8;

  always_comb begin
    st_d       = st;
    st_d.rsync = {st.rsync[0], 1'b1};
    if (st.rsync[1]) begin
      st_d.cnt  = st.cnt + 3'd1;
      st_d.clk8 = (st_d.cnt < 3'd4);
    end
  end

  always_ff @(posedge clk64_in or negedge rst_n)
    if (!rst_n) st <= '{rsync: 2'b00, cnt: 3'd7, clk8: 1'b0};
    else if (se) st <= st_t'({st[$bits(st_t)-2:0], si});
    else         st <= st_d;

  // 64 MHz output enable, changed only while clk64_in is low.
  always_ff @(negedge clk64_in or negedge rst_n)
    if (!rst_n) run_q <= 1'b0;
    else        run_q <= st.rsync[1];

  always_ff @(posedge st.clk8 or negedge rst_n)
    if (!rst_n) r8 <= 2'b00;
    else        r8 <= {r8[0], 1'b1};

  assign so      = st[$bits(st_t)-1];
  assign clk64_o = clk64_in & run_q;
  assign clk8_o  = st.clk8;
  assign rst8_n  = r8[1];
endmodule
