// tb_demod_shell: self-checking test of the demodulator test shell. Loads
// the local TCB through its TAP strobes, then checks: functional
// transparency of the wrapper; in test mode the lengths of the four test
// scan chains (482, 77, 66 and 3 wrapper cells, or 1 with the core
// bypass); intest (wrapper cells drive the core's I/Q inputs); extest
// (wrapper cell drives the bit output); and that the TCB's debug scan
// enable reaches the core's chains outside test mode.
module tb_demod_shell;
  import rto7_pkg::*;
  `include "tb/tb_common.svh"
  logic tck = 0, trst_n = 1, tdi = 0, rst_n = 0, id = 0, qd = 0, bit_o, so;
  logic test_mode = 0, test_se = 0, dbg_so, ac_so, bc_so, dbg_stop_req;
  logic [3:0] scan_si = '0, scan_so;
  instr_e instr = I_PROGRAM_TCB;
  dr_ctl_t dr_ctl = '0;
  logic [1023:0] dout;
  logic f = 0, run = 1, clk8, clk64;
  logic [2:0] c = 0;
  `include "tb/dr_tasks.svh"

  demod_shell dut (.clk64, .clk8, .rst_n, .tck, .trst_n, .tdi, .instr, .dr_ctl,
                   .tcb_si(tdi), .tcb_so(so), .id, .qd, .bit_o, .test_mode, .test_se,
                   .scan_si, .scan_so, .dbg_so, .ac_so, .bc_so, .dbg_stop_req);

  always #2 f = ~f;
  always @(posedge f) c <= c + 1'b1;
  assign clk64 = run ? f : tck;
  assign clk8  = run ? ~c[2] : tck;

  task automatic set_tcb(input ltcb_t v);
    instr = I_PROGRAM_TCB;
    dr_shift(1024'(v), LTCB_W, dout);
    dr_update();
  endtask

  // Length of test chain k: flush zeros, send one 1, count shifts.
  task automatic chain_len(input int k, input int maxn, output int len);
    test_se = 1;
    scan_si = '0;
    for (int i = 0; i < maxn; i++) tck_pulse();
    scan_si[k] = 1'b1;
    tck_pulse();
    scan_si = '0;
    len = 0;
    for (int i = 1; i <= maxn && len == 0; i++) begin
      if (scan_so[k]) len = i;
      tck_pulse();
    end
  endtask

  initial begin #5000000; check(0, "watchdog"); finish_tb(); end

  initial begin
    ltcb_t t;
    int len;
    #1 trst_n = 0;
    #20 trst_n = 1;
    repeat (4) @(posedge clk8);
    rst_n = 1;
    repeat (20) begin
      @(negedge clk8);
      id = 1'($urandom); qd = 1'($urandom);
      #1 check(dut.core_in == {qd, id}, "wrapper transparent for inputs");
      check(bit_o == dut.core_bit, "wrapper transparent for output");
    end
    t = '0;
    t.dbg_se = 1'b1;
    set_tcb(t);
    #1 check(dut.u_dbg.se == 1'b1, "debug scan enable from the TCB");
    t = '0;
    set_tcb(t);
    #1 check(dut.u_dbg.se == 1'b0, "debug scan enable cleared");
    // test mode
    run = 0;
    test_mode = 1;
    chain_len(0, 600, len); check(len == 482, $sformatf("test chain 0 length %0d", len));
    chain_len(1, 100, len); check(len == 77,  $sformatf("test chain 1 length %0d", len));
    chain_len(2, 100, len); check(len == 66,  $sformatf("test chain 2 length %0d", len));
    chain_len(3, 10, len);  check(len == 3,   $sformatf("wrapper chain length %0d", len));
    t.bypass = 1'b1;
    set_tcb(t);
    chain_len(3, 10, len);  check(len == 1,   $sformatf("bypass length %0d", len));
    // intest / extest: shift 3 bits into the wrapper (last bit -> input cell 0)
    t = '0;
    t.intest = 1'b1;
    t.extest = 1'b1;
    set_tcb(t);
    test_se = 1;
    scan_si[3] = 1'b1; tck_pulse();   // ends in the output cell
    scan_si[3] = 1'b0; tck_pulse();   // input cell 1 (Q)
    scan_si[3] = 1'b1; tck_pulse();   // input cell 0 (I)
    test_se = 0;
    #1;
    check(dut.core_in == 2'b01, $sformatf("intest drives core inputs, got %b", dut.core_in));
    check(bit_o == 1'b1, "extest drives the bit output");
    finish_tb();
  end
endmodule
