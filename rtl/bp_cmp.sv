// bp_cmp: breakpoint module for observation points C, D and E.
//
// A comparator gives two flags: input greater than the reference, and
// input equal to the reference (12-bit two's complement). Two 9-bit
// counters count the cycles with each condition when their enables
// (en_gt, en_eq) are set. A flag whose counter is disabled requests a
// clock stop. Flags and counters are read through the BC-TPR. This is the
// module of the chip description; the per-counter enables (which make the
// BC-TPR total 204 bits) and saturation at 511 are this design's reading.
//
// Timing: 8 MHz clock; flags and counts follow the input by one cycle.
// Reset: synchronous, active-low functional reset.
module bp_cmp
  import rto7_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic signed [PH_W-1:0] din,
  input  bp_cde_ctl_t ctl,
  output bp_cde_obs_t obs,
  output logic stop_req
);
  logic gt, eq;
  assign gt = din > ctl.ref_val;
  assign eq = din == ctl.ref_val;

  always_ff @(posedge clk)
    if (!rst_n) obs <= '0;
    else begin
      obs.flag_gt <= gt;
      obs.flag_eq <= eq;
      if (ctl.en_gt && gt && obs.cnt_gt != '1) obs.cnt_gt <= obs.cnt_gt + 1'b1;
      if (ctl.en_eq && eq && obs.cnt_eq != '1) obs.cnt_eq <= obs.cnt_eq + 1'b1;
    end

  assign stop_req = (obs.flag_gt && !ctl.en_gt) || (obs.flag_eq && !ctl.en_eq);
endmodule
