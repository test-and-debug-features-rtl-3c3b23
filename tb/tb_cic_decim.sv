// tb_cic_decim: self-checking test of the CIC decimators. Feeds periodic
// bit patterns of known density and checks the settled 8 MHz output
// against the mean input times the CIC gain 512 and the scale 2**8:
// all ones -> +131072, all zeros -> -131072, 6 of 8 ones -> +65536,
// alternating -> 0. Also checks the 64 MHz scan chain length (66 bits).
module tb_cic_decim;
  import rto7_pkg::*;
  `include "tb/tb_common.svh"
  logic clk64 = 0, rst_n = 0, d_i = 0, d_q = 0, se64 = 0, si64 = 0, so64, se8 = 0, si8 = 0, so8;
  logic [2:0] c = 0;
  logic clk8;
  logic signed [AB_W-1:0] i_o, q_o;
  logic [7:0] pat_i, pat_q;
  int n64 = 0;

  cic_decim dut (.clk64, .clk8, .rst_n, .d_i, .d_q, .se64, .si64, .so64, .se8, .si8, .so8, .i_o, .q_o);

  always #5 clk64 = ~clk64;
  always @(posedge clk64) c <= c + 1'b1;
  assign clk8 = ~c[2];
  always @(negedge clk64) begin
    d_i <= pat_i[n64 % 8];
    d_q <= pat_q[(n64 + 3) % 8];
    n64 <= n64 + 1;
  end

  task automatic run_pattern(input logic [7:0] pi, input logic [7:0] pq, input int ei, input int eq);
    pat_i = pi;
    pat_q = pq;
    repeat (10) @(posedge clk8);
    repeat (4) begin
      @(posedge clk8); #1;
      check(i_o == ei, $sformatf("I pattern %b: want %0d got %0d", pi, ei, i_o));
      check(q_o == eq, $sformatf("Q pattern %b: want %0d got %0d", pq, eq, q_o));
    end
  endtask

  initial begin #1000000; check(0, "watchdog"); finish_tb(); end

  initial begin
    pat_i = 0; pat_q = 0;
    repeat (20) @(posedge clk64);
    rst_n = 1;
    run_pattern(8'hFF, 8'h00, 131072, -131072);
    run_pattern(8'b0111_0111, 8'b1101_1101, 65536, 65536);
    run_pattern(8'b0101_0101, 8'b1010_1010, 0, 0);
    run_pattern(8'b0000_0001, 8'hFF, -98304, 131072);
    // 64 MHz chain length: 2 channels x 3 integrators x 11 bits
    @(negedge clk64);
    se64 = 1;
    si64 = 0;
    repeat (70) @(negedge clk64);
    si64 = 1;
    @(negedge clk64);
    si64 = 0;
    for (int k = 1; k <= 66; k++) begin
      if (k < 66) check(so64 == 1'b0, "marker not early");
      else check(so64 == 1'b1, "marker after 66 shifts");
      @(negedge clk64);
    end
    finish_tb();
  end
endmodule
