// tb_wrapper_chain: self-checking test of a wrapper scan chain: functional
// transparency, capture of pin inputs and core outputs, shifting, and
// intest/extest driving from the cells.
module tb_wrapper_chain;
  `include "tb/tb_common.svh"
  logic tclk = 0, se = 0, si = 0, so, intest = 0, extest = 0;
  logic [2:0] pin_in, core_in;
  logic [1:0] core_out, pin_out;

  wrapper_chain #(.NI(3), .NO(2)) dut (.tclk, .se, .si, .so, .intest, .extest,
                                       .pin_in, .core_in, .core_out, .pin_out);

  task automatic clk(); #5 tclk = 1; #5 tclk = 0; endtask

  initial begin #100000; check(0, "watchdog"); finish_tb(); end

  initial begin
    for (int t = 0; t < 20; t++) begin
      logic [4:0] cap, got, v;
      pin_in = 3'($urandom);
      core_out = 2'($urandom);
      intest = 0; extest = 0;
      #1 check(core_in == pin_in && pin_out == core_out, "transparent");
      cap = {core_out, pin_in};
      se = 0; clk();           // capture
      se = 1;
      v = 5'($urandom);
      for (int i = 0; i < 5; i++) begin
        got[4-i] = so;
        si = v[4-i];
        clk();
      end
      check(got == cap, $sformatf("capture %h got %h", cap, got));
      intest = 1; extest = 1;
      #1;
      check(core_in == v[2:0], "intest drives core inputs");
      check(pin_out == v[4:3], "extest drives pin outputs");
    end
    finish_tb();
  end
endmodule
