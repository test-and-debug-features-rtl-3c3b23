// tb_cordic_vec: self-checking test of the vectoring CORDIC against
// atan2 in units of 1/4096 turn (tolerance 1 LSB, modulo one turn) for
// random vectors of magnitude above 1000, all quadrants and the axes.
module tb_cordic_vec;
  import rto7_pkg::*;
  `include "tb/tb_common.svh"
  logic clk = 0, rst_n = 0, se = 0, si = 0, so;
  logic signed [AB_W-1:0] i_in, q_in;
  logic signed [PH_W-1:0] phase;

  cordic_vec dut (.clk, .rst_n, .se, .si, .so, .i_in, .q_in, .phase);
  always #5 clk = ~clk;

  task automatic one(input int i, input int q);
    real e;
    int d;
    i_in = AB_W'(i);
    q_in = AB_W'(q);
    e = $atan2(real'(q), real'(i)) / (2.0 * 3.14159265358979) * 4096.0;
    @(negedge clk);
    d = (int'(phase) - $rtoi(e + (e >= 0 ? 0.5 : -0.5)) + 8192) % 4096;
    if (d > 2048) d -= 4096;
    check(d >= -1 && d <= 1, $sformatf("(%0d,%0d): want %f got %0d", i, q, e, phase));
  endtask

  initial begin #1000000; check(0, "watchdog"); finish_tb(); end

  initial begin
    i_in = 0; q_in = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    one(100000, 0); one(0, 100000); one(-100000, 0); one(0, -100000);
    one(50000, 50000); one(-50000, 50000); one(-50000, -50000); one(50000, -50000);
    for (int t = 0; t < 400; t++) begin
      int i, q;
      i = $signed($urandom % 400000) - 200000;
      q = $signed($urandom % 400000) - 200000;
      if (i * i + q * q > 1000000) one(i, q);
    end
    finish_tb();
  end
endmodule
