// tb_clk_rst_gen: self-checking test of the clock generator. Checks that
// both output clocks are low during reset, that the 8 MHz clock first
// rises 3 input cycles after reset release and then has period 8 and
// duty 4/8, that the 64 MHz output resumes with a whole pulse, that the
// internal reset rises at the second 8 MHz rising edge, and the scan path.
module tb_clk_rst_gen;
  `include "tb/tb_common.svh"
  logic clk64_in = 0, rst_n = 1, se = 0, si = 0, so, clk64_o, clk8_o, rst8_n;
  int cyc, last_rise, n8, high_cnt;

  clk_rst_gen dut (.clk64_in, .rst_n, .se, .si, .so, .clk64_o, .clk8_o, .rst8_n);

  always #5 clk64_in = ~clk64_in;
  always @(posedge clk64_in) begin
    cyc++;
    if (clk8_o) high_cnt++;
  end

  initial begin #100000; check(0, "watchdog"); finish_tb(); end

  initial begin
    int rel, first_rise;
    #2 rst_n = 0;
    repeat (4) @(posedge clk64_in);
    #1;
    check(!clk8_o && !clk64_o && !rst8_n, "clocks and reset low in reset");
    @(negedge clk64_in);
    rst_n = 1;
    rel = cyc;
    @(posedge clk8_o);
    first_rise = cyc;
    check(first_rise - rel == 3, $sformatf("first 8 MHz edge after %0d cycles", first_rise - rel));
    check(!rst8_n, "internal reset still low at first edge");
    @(posedge clk8_o);
    #1 check(rst8_n, "internal reset released at second edge");
    for (int k = 0; k < 5; k++) begin
      int c0;
      c0 = cyc;
      high_cnt = 0;
      @(posedge clk8_o);
      check(cyc - c0 == 8, $sformatf("8 MHz period %0d", cyc - c0));
      check(high_cnt == 4, $sformatf("duty %0d/8", high_cnt));
    end
    // scan: 6 flip-flops
    @(negedge clk64_in);
    se = 1;
    for (int i = 0; i < 6; i++) begin si = i[0]; @(negedge clk64_in); end
    for (int i = 0; i < 6; i++) begin
      check(so == i[0], "scan out order");
      si = 0;
      @(negedge clk64_in);
    end
    se = 0;
    finish_tb();
  end
endmodule
