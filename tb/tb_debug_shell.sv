// tb_debug_shell: self-checking test of the demodulator debug shell. The
// testbench plays the clock controller: it runs the domain clocks until
// the shell's stop request, and during a debug scan it clocks the
// selected domain with TCK. Checks: a range breakpoint on point A stops
// the clocks; the BC-TPR reads back flag A set and counts from the
// counting breakpoints; a state dump of the 8 MHz chain (length 559)
// returns the live DFE output and, shifted a second time, exactly the
// pattern shifted in; the 64 MHz chain is 66 bits long; the bypass is one
// bit and holds outside DBG_SCAN; in counting mode no stop is requested.
module tb_debug_shell;
  import rto7_pkg::*;
  `include "tb/tb_common.svh"
  localparam int L8 = 482 + 77;
  logic tck = 0, trst_n = 1, tdi = 0, rst_n = 0, id = 1, qd = 0, bit_o;
  logic test_mode = 0, test_se = 0, dbg_se = 0, dbg_so, ac_so, bc_so, dbg_stop_req, so;
  logic [2:0] scan_si = '0, scan_so;
  instr_e instr = I_BYPASS;
  dr_ctl_t dr_ctl = '0;
  logic [1023:0] dout, pat, tmp;
  logic f64 = 0, run = 1, scan8 = 0, scan64 = 0, clk64, clk8;
  logic [2:0] c = 0;
  int stops, cyc;
  `include "tb/dr_tasks.svh"

  debug_shell dut (.clk64, .clk8, .rst_n, .tck, .trst_n, .tdi, .instr, .dr_ctl, .id, .qd, .bit_o,
                   .test_mode, .test_se, .scan_si, .scan_so, .dbg_se, .dbg_so, .ac_so, .bc_so,
                   .dbg_stop_req);

  always #2 f64 = ~f64;
  always @(posedge f64) if (run) c <= c + 1'b1;
  assign clk64 = run ? f64 : (scan64 & tck);
  assign clk8  = run ? ~c[2] : (scan8 & tck);
  // stop while the 8 MHz clock is low, as the controller's falling-edge gate does
  always @(negedge f64) if (run && dbg_stop_req && c[2]) begin run <= 0; stops++; end
  always @(posedge clk8) cyc++;

  always_comb
    unique case (instr)
      I_PROGRAM_DBG_AC: so = ac_so;
      I_PROGRAM_DBG_BC: so = bc_so;
      default:          so = dbg_so;
    endcase

  task automatic program_bc(input bc_ctl_t v);
    instr = I_PROGRAM_DBG_BC;
    dr_shift({'0, v, {BC_OBS_W{1'b0}}}, BC_W, dout);
    dr_update();
  endtask

  task automatic read_bc(output bc_obs_t o);
    instr = I_PROGRAM_DBG_BC;
    dr_capture();
    dr_shift(1024'({dut.u_bc.ctl, {BC_OBS_W{1'b0}}}), BC_W, dout);
    o = bc_obs_t'(dout[BC_OBS_W-1:0]);
  endtask

  task automatic select(input ac_sel_e a);
    instr = I_PROGRAM_DBG_AC;
    dr_shift(1024'(a), 2, dout);
  endtask

  task automatic restart();
    run = 1;
    rst_n = 0;
    repeat (3) @(posedge clk8);
    #1 rst_n = 1;
  endtask

  initial begin #5000000; check(0, "watchdog"); finish_tb(); end

  initial begin
    bc_ctl_t ctl;
    bc_obs_t o;
    logic [PH_W-1:0] y_live;
    #1 trst_n = 0;
    #20 trst_n = 1;
    ctl = bc_ctl_reset();
    ctl.ab[0].lo = -20'sd1000;
    ctl.ab[0].hi = 20'sd1000;
    ctl.ab[0].en_cnt = 1'b0;
    program_bc(ctl);
    restart();
    wait (!run);
    check(stops == 1, "breakpoint A stopped the clocks");
    read_bc(o);
    check(o.ab[0].flag, "BC-TPR: flag A set");
    check(o.ab[0].cnt == 0, "BC-TPR: counter A disabled");
    check(o.ab[1].cnt != 0 || o.cde[0].cnt_gt != 0 || o.cde[0].cnt_eq != 0, "BC-TPR: counting breakpoints counted");
    // state dump of the 8 MHz chain
    y_live = dut.u_core.pt_e;
    select(AC_CHAIN8);
    dbg_se = 1;
    instr = I_DBG_SCAN;
    scan8 = 1;
    pat = '0;
    for (int i = 0; i < L8; i++) pat[i] = 1'($urandom);
    dr_shift(pat, L8, dout);
    for (int k = 0; k < PH_W; k++) check(dout[8 + k] == y_live[PH_W-1-k], "dump holds the DFE output");
    dr_shift('0, L8, tmp);
    check(tmp[L8-1:0] == pat[L8-1:0], "second dump returns the shifted-in pattern (chain length 559)");
    scan8 = 0;
    // 64 MHz chain: length 66
    select(AC_CHAIN64);
    instr = I_DBG_SCAN;
    scan64 = 1;
    dr_shift('0, 70, dout);
    dr_shift(1024'(1), 67, dout);
    check(dout[66] == 1'b1 && dout[65:0] == '0, "64 MHz chain length 66");
    scan64 = 0;
    // bypass
    select(AC_BYPASS);
    instr = I_DBG_SCAN;
    dr_shift(512'b11101, 5, dout);
    check(dout[4:1] == 4'b1101, "debug bypass is one bit");
    instr = I_PROGRAM_DBG_BC;
    dr_shift('0, 3, tmp);
    instr = I_DBG_SCAN;
    dr_shift('0, 1, dout);
    check(dout[0] == 1'b1, "debug bypass holds outside DBG_SCAN");
    dbg_se = 0;
    // counting mode: no stop
    ctl.ab[0].en_cnt = 1'b1;
    program_bc(ctl);
    stops = 0;
    restart();
    cyc = 0;
    wait (cyc == 300);
    check(stops == 0 && run, "counting mode requests no stop");
    run = 0;
    #20;
    read_bc(o);
    check(o.ab[0].cnt > 100, $sformatf("counter A counted %0d out-of-range cycles", o.ab[0].cnt));
    finish_tb();
  end
endmodule
