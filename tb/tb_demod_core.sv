// tb_demod_core: end-to-end test of the demodulator. The testbench models
// the analog part: a GFSK-like signal on a 500 kHz low IF (+-160 kHz
// deviation, 1 Mb/s, plus an optional carrier offset) is converted to I
// and Q bit streams at 64 MHz by two first-order sigma-delta modulators.
// Checks: the recovered 8x over-sampled bit stream matches the sent data
// (best alignment, at least 95% of symbols); the frequency loop settles
// to minus the offset (in units of 1/4096 turn per 8 MHz sample, 50 kHz =
// 25.6); and the two 8 MHz scan chains are continuous.
module tb_demod_core;
  import rto7_pkg::*;
  `include "tb/tb_common.svh"
  localparam real PI = 3.14159265358979;
  logic clk64 = 0, rst_n = 0, id = 0, qd = 0, se8 = 0, se64 = 0, bit_o;
  logic [2:0] si = '0, so;
  logic [2:0] c = 0;
  logic clk8;
  logic signed [AB_W-1:0] pa, pb;
  logic signed [PH_W-1:0] pc, pd, pe;

  demod_core dut (.clk64, .clk8, .rst_n, .id, .qd, .se8, .se64, .si, .so, .bit_o,
                  .pt_a(pa), .pt_b(pb), .pt_c(pc), .pt_d(pd), .pt_e(pe));

  always #5 clk64 = ~clk64;
  always @(posedge clk64) c <= c + 1'b1;
  assign clk8 = ~c[2];

  // sigma-delta model
  real theta, acc_i, acc_q, f_off;
  bit data[200];
  int n64;
  always @(negedge clk64) begin
    real f, xi, xq;
    f = 500.0e3 + f_off + (data[(n64 / 64) % 200] ? 160.0e3 : -160.0e3);
    theta = theta + 2.0 * PI * f / 64.0e6;
    if (theta > PI) theta -= 2.0 * PI;
    xi = 0.5 * $cos(theta);
    xq = 0.5 * $sin(theta);
    id <= (acc_i >= 0.0);
    qd <= (acc_q >= 0.0);
    acc_i = acc_i + xi - ((acc_i >= 0.0) ? 1.0 : -1.0);
    acc_q = acc_q + xq - ((acc_q >= 0.0) ? 1.0 : -1.0);
    n64++;
  end

  // record output bits at 8 MHz
  bit rec[$];
  always @(posedge clk8) if (rst_n) rec.push_back(bit_o);

  task automatic run(input real off, input int exp_err);
    int best, nsym, err_avg;
    f_off = off;
    rst_n = 0;
    rec.delete();
    n64 = 0;
    repeat (40) @(posedge clk64);
    rst_n = 1;
    repeat (150 * 64) @(posedge clk64);
    // alignment search over the last 100 symbols
    best = 0;
    for (int d = 0; d < 64; d++) begin
      int m;
      m = 0;
      for (int s = 50; s < 150; s++)
        if (s * 8 + d < rec.size() && rec[s * 8 + d] == data[s]) m++;
      if (m > best) best = m;
    end
    check(best >= 95, $sformatf("offset %0f: %0d of 100 symbols recovered", off, best));
    err_avg = 0;
    for (int k = 0; k < 800; k++) begin
      @(posedge clk8);
      err_avg += int'(dut.u_lp.err);
    end
    err_avg = err_avg / 800;
    check(err_avg >= exp_err - 5 && err_avg <= exp_err + 5,
          $sformatf("offset %0f: loop error %0d, expected about %0d", off, err_avg, exp_err));
  endtask

  initial begin #20000000; check(0, "watchdog"); finish_tb(); end

  initial begin
    theta = 0; acc_i = 0.1; acc_q = -0.1; f_off = 0; n64 = 0;
    // DC-free data: random bit followed by its complement
    for (int k = 0; k < 200; k++) data[k] = (k % 2 == 0) ? 1'($urandom) : !data[k - 1];
    run(0.0, 0);
    run(50.0e3, -26);
    run(-30.0e3, 15);
    // scan continuity of the two 8 MHz chains: flush zeros, then a marker
    @(negedge clk8);
    se8 = 1;
    si = '0;
    repeat (800) @(negedge clk8);
    check(so[1:0] == 2'b00, "chains flushed");
    si[0] = 1'b1; si[1] = 1'b1;
    @(negedge clk8);
    si = '0;
    begin
      int l0, l1;
      l0 = 0; l1 = 0;
      for (int k = 1; k < 800; k++) begin
        if (so[0] && l0 == 0) l0 = k;
        if (so[1] && l1 == 0) l1 = k;
        @(negedge clk8);
      end
      // CIC 8 MHz part 10x11, NCO 12, rotator 2x20, matched filter 16x20
      check(l0 == 10 * 11 + 12 + 2 * 20 + 16 * 20, $sformatf("chain 0 length %0d", l0));
      // vectoring 12, differentiator 24, loop 20, DFE 8+12+1
      check(l1 == 12 + 24 + 20 + 21, $sformatf("chain 1 length %0d", l1));
    end
    finish_tb();
  end
endmodule
