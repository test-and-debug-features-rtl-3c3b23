// tb_nco: self-checking test of the NCO phase accumulator against a
// modulo-4096 counter, with the default word -256 (one turn every 16
// samples) and random words; and its scan path.
module tb_nco;
  import rto7_pkg::*;
  `include "tb/tb_common.svh"
  logic clk = 0, rst_n = 0, se = 0, si = 0, so;
  logic signed [PH_W-1:0] freq;
  logic [PH_W-1:0] phase;
  int model;

  nco dut (.clk, .rst_n, .se, .si, .so, .freq, .phase);
  always #5 clk = ~clk;

  initial begin #100000; check(0, "watchdog"); finish_tb(); end

  initial begin
    freq = PH_W'(F_DEFAULT);
    @(negedge clk); @(negedge clk);
    check(phase == 0, "reset phase 0");
    rst_n = 1;
    model = 0;
    for (int k = 0; k < 300; k++) begin
      if (k >= 32 && k % 10 == 0) freq = PH_W'($urandom);
      @(negedge clk);
      model = (model + int'(freq) + 8192) % 4096;
      check(phase == PH_W'(model), $sformatf("phase want %0d got %0d", model, phase));
      if (k == 15) check(phase == 0, "-256 wraps after 16 samples");
    end
    se = 1;
    for (int k = 0; k < PH_W; k++) begin si = k[0] ^ k[2]; @(negedge clk); end
    for (int k = 0; k < PH_W; k++) begin check(so == (k[0] ^ k[2]), "scan"); @(negedge clk); end
    finish_tb();
  end
endmodule
