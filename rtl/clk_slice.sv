// clk_slice: clock control slice for one on-chip clock domain.
//
// The slice chooses and gates the clock of its domain. In functional mode
// it passes the functional clock while the domain is neither powered down
// (pd) nor held by a breakpoint. The gate is a flip-flop on the falling
// edge of the functional clock, so the gated clock never gets a short
// pulse. A breakpoint stop (bp_stop, one or more cycles) sets a hold
// flip-flop that keeps the domain stopped until the next functional reset,
// even when the stop request later goes away; power-down only lasts while
// pd is high. The hold matters during a state dump: the breakpoint modules
// keep seeing new values while the chains shift, and their requests may
// drop, which must not let functional clock pulses in. While the
// functional gate is closed the domain can be clocked from TCK for a
// debug scan: dbg_en, sampled on the falling edge of TCK, lets whole TCK
// pulses through. In test mode the domain runs on the test clock (TCK),
// gated by test_en, which allows test clock pulses to be suppressed.
// Switching between functional, test and debug clocks by slices
// controlled from the CC-TPR and the TCB follows the chip description;
// the falling-edge gating flip-flops (latches are not used) and the hold
// until reset are this design's choices.
//
// stopped reports that the functional gate is closed.
// Reset: rst_n (functional reset) opens the functional gate and clears
// the hold; trst_n closes the debug and test gates. Both asynchronous.
// The functional reset is released while fclk is still held low by the
// clock generator, which starts its clocks only some cycles after its own
// synchronised release, so the asynchronous release never meets an fclk
// edge.
module clk_slice (
  input  logic fclk,
  input  logic tck,
  input  logic rst_n,
  input  logic trst_n,
  input  logic pd,
  input  logic bp_stop,
  input  logic test_mode,
  input  logic test_en,
  input  logic dbg_en,
  output logic clk_o,
  output logic stopped
);
  logic func_en_q, held_q, test_en_q, dbg_en_q;

  always_ff @(negedge fclk or negedge rst_n)
    if (!rst_n) begin
      func_en_q <= 1'b1;
      held_q    <= 1'b0;
    end else begin
      held_q    <= held_q | bp_stop;
      func_en_q <= !pd && !bp_stop && !held_q;
    end

  always_ff @(negedge tck or negedge trst_n)
    if (!trst_n) begin
      test_en_q <= 1'b0;
      dbg_en_q  <= 1'b0;
    end else begin
      test_en_q <= test_en;
      dbg_en_q  <= dbg_en;
    end

  always_comb
    if (test_mode) clk_o = tck & test_en_q;
    else           clk_o = (fclk & func_en_q) | (tck & dbg_en_q);

  assign stopped = !func_en_q;
endmodule
