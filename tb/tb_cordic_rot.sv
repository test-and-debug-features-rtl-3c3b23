// tb_cordic_rot: self-checking test of the rotating CORDIC against a
// floating-point rotation by the same angle times the CORDIC gain
// (product of sqrt(1+2**-2k), k = 0..11). Tolerance: 0.2% of the
// magnitude plus 8 LSB. Also checks the one-cycle latency.
module tb_cordic_rot;
  import rto7_pkg::*;
  `include "tb/tb_common.svh"
  logic clk = 0, rst_n = 0, se = 0, si = 0, so;
  logic signed [AB_W-1:0] i_in, q_in, i_out, q_out;
  logic [PH_W-1:0] angle;
  real K;

  cordic_rot dut (.clk, .rst_n, .se, .si, .so, .i_in, .q_in, .angle, .i_out, .q_out);
  always #5 clk = ~clk;

  initial begin #1000000; check(0, "watchdog"); finish_tb(); end

  initial begin
    K = 1.0;
    for (int k = 0; k < 12; k++) K = K * $sqrt(1.0 + 2.0 ** (-2 * k));
    i_in = 0; q_in = 0; angle = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      real th, ei, eq, mag;
      i_in = AB_W'($signed($urandom % 262144) - 131072);
      q_in = AB_W'($signed($urandom % 262144) - 131072);
      angle = PH_W'($urandom);
      th = 2.0 * 3.14159265358979 * real'($signed(angle)) / 4096.0;
      ei = K * (real'(i_in) * $cos(th) - real'(q_in) * $sin(th));
      eq = K * (real'(i_in) * $sin(th) + real'(q_in) * $cos(th));
      mag = $sqrt(ei * ei + eq * eq);
      @(negedge clk);
      check((real'(i_out) - ei) ** 2 < (0.002 * mag + 8) ** 2, $sformatf("I t=%0d want %f got %0d", t, ei, i_out));
      check((real'(q_out) - eq) ** 2 < (0.002 * mag + 8) ** 2, $sformatf("Q t=%0d want %f got %0d", t, eq, q_out));
    end
    finish_tb();
  end
endmodule
