// bp_range: breakpoint module for observation points A and B.
//
// A comparator checks whether the 20-bit two's-complement input lies
// outside the window [lo, hi] given by the BC-TPR. The comparator result
// is registered as the flag. With en_cnt low the flag is a clock stop
// request (stop_req). With en_cnt high the module only counts: a 9-bit
// counter increments in every cycle the input is out of range, and no
// stop is requested. Flag and counter are read through the BC-TPR. This is
// the module of the chip description; the counter saturating at 511
// instead of wrapping is this design's choice.
//
// Timing: 8 MHz demodulator clock; the flag and count follow the input by
// one cycle. Reset: synchronous, active-low functional reset.
module bp_range
  import rto7_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic signed [AB_W-1:0] din,
  input  bp_ab_ctl_t ctl,
  output bp_ab_obs_t obs,
  output logic stop_req
);
  logic oor;
  assign oor = (din < ctl.lo) || (din > ctl.hi);

  always_ff @(posedge clk)
    if (!rst_n) obs <= '0;
    else begin
      obs.flag <= oor;
      if (ctl.en_cnt && oor && obs.cnt != '1) obs.cnt <= obs.cnt + 1'b1;
    end

  assign stop_req = obs.flag && !ctl.en_cnt;
endmodule
