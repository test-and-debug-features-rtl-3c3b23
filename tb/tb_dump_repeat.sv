// tb_dump_repeat: repeated debug runs at different TCK frequencies, all of
// which must give identical state dumps.
//
// A debugger on an application board starts each debug run the same way:
// program a breakpoint, reset the chip through the TAP (DBG_RESET), let
// the receiver run into the breakpoint and shift out the state. How long
// the host takes between these steps depends on the TCK rate and on
// software, and at the moment of programming the chip may be stopped from
// the previous run or may still be running, so that the new breakpoint
// fires before the reset. None of this may change the dump. This
// testbench repeats the run with TCK from 1.25 MHz to 20 MHz, random idle
// time between programming and reset, random reset length, and every
// other run started from a running chip that hits the breakpoint before
// it is reset. The sigma-delta stimulus restarts on the rising edge of the
// internal reset pin. The 8 MHz (559 bits) and 64 MHz (66 bits) dumps of
// every run are compared with those of the first run; the number of runs
// in which the breakpoint fired before the reset is counted and must be
// non-zero.
module tb_dump_repeat;
  import rto7_pkg::*;
  `include "tb/tb_common.svh"
  localparam int L8 = 559;
  localparam int L64 = 66;
  localparam int RUNS = 40;
  localparam real PI = 3.14159265358979;
  // TCK half periods (ns): 1.25 MHz to 20 MHz
  localparam int HALVES[8] = '{25, 400, 40, 250, 60, 100, 30, 333};
  int JT_HALF = 25;

  logic tck = 0, tms = 1, tdi = 0, trst_n = 1, tdo, tdo_en;
  logic clk64 = 0, rst_n = 1, id = 0, qd = 0;
  logic bit_out, clk8_out, rst_out;
  logic [3:0] scan_out;
  logic [APP_W-1:0] app_q;
  logic [1023:0] dout;
  logic [3:0] cap;

  rto7_top dut (.tck, .tms, .tdi, .trst_n, .tdo, .tdo_en, .clk64, .rst_n, .id, .qd,
                .as_sclk(1'b0), .as_sdata(1'b0), .as_sen(1'b0), .as_ld(1'b0), .bit_out,
                .clk8_out, .rst_out, .scan_in(4'h0), .scan_out, .app_q);

  `include "tb/jtag_tasks.svh"

  always #8 clk64 = ~clk64;

  // sigma-delta ADC model, restarted by the internal reset pin
  real theta, acc_i, acc_q;
  bit data[256];
  int n64;
  always @(posedge rst_out) begin
    theta = 0.0; acc_i = 0.1; acc_q = -0.1; n64 = 0;
  end
  always @(negedge clk64) begin
    real f;
    f = 500.0e3 + (data[(n64 / 64) % 256] ? 160.0e3 : -160.0e3);
    theta = theta + 2.0 * PI * f / 64.0e6;
    if (theta > PI) theta -= 2.0 * PI;
    id <= (acc_i >= 0.0);
    qd <= (acc_q >= 0.0);
    acc_i = acc_i + 0.5 * $cos(theta) - ((acc_i >= 0.0) ? 1.0 : -1.0);
    acc_q = acc_q + 0.5 * $sin(theta) - ((acc_q >= 0.0) ? 1.0 : -1.0);
    n64++;
  end

  task automatic ir(input instr_e i);
    jt_ir(i, cap);
  endtask

  task automatic program_bc(input bc_ctl_t c, output bc_obs_t o);
    ir(I_PROGRAM_DBG_BC);
    jt_dr({'0, c, {BC_OBS_W{1'b0}}}, BC_W, dout);
    o = bc_obs_t'(dout[BC_OBS_W-1:0]);
  endtask

  task automatic program_tcb(input ltcb_t d);
    ir(I_PROGRAM_TCB);
    jt_dr(1024'({GTCB_W'(0), LTCB_W'(0), d}), GTCB_W + 2 * LTCB_W, dout);
  endtask

  task automatic program_cc(input cc_t v);
    ir(I_PROGRAM_DBG_CC);
    jt_dr(1024'(v), CC_W, dout);
  endtask

  task automatic program_ac(input ac_sel_e a);
    ir(I_PROGRAM_DBG_AC);
    jt_dr(1024'(a), 2, dout);
  endtask

  initial begin #100000000; check(0, "watchdog"); finish_tb(); end

  initial begin
    logic [1023:0] d8[RUNS], d64[RUNS];
    int early_hits, stops;
    bc_ctl_t bp, cnt_mode;
    bc_obs_t o;
    for (int k = 0; k < 256; k++) data[k] = (k % 2 == 0) ? 1'($urandom) : !data[k - 1];
    bp = bc_ctl_reset();
    bp.ab[0].lo = -20'sd60000;
    bp.ab[0].hi = 20'sd60000;
    bp.ab[0].en_cnt = 1'b0;
    cnt_mode = bc_ctl_reset();
    early_hits = 0;
    stops = 0;
    #1 trst_n = 0; rst_n = 0;
    #100 trst_n = 1;
    jt_reset();
    #200 rst_n = 1;
    for (int r = 0; r < RUNS; r++) begin
      int polls;
      JT_HALF = HALVES[r % 8];
      program_tcb('0);
      program_cc('{stop8: 1'b1, stop64: 1'b1, default: 1'b0});
      if (r % 2 == 1) begin
        // start from a running chip: counting mode, reset, run
        program_bc(cnt_mode, o);
        ir(I_DBG_RESET);
        jt_idle(4);
        ir(I_BYPASS);
        jt_idle(20);
      end
      program_bc(bp, o);
      jt_idle($urandom % 100);
      if (dut.stop_req) early_hits++;
      ir(I_DBG_RESET);
      jt_idle(2 + $urandom % 30);
      ir(I_BYPASS);
      polls = 0;
      do begin
        jt_idle(20);
        program_bc(bp, o);
        polls++;
      end while (!o.ab[0].flag && polls < 100);
      if (o.ab[0].flag) stops++;
      // dumps
      program_ac(AC_CHAIN8);
      program_cc('{stop8: 1'b1, stop64: 1'b1, dbg_clk8: 1'b1, default: 1'b0});
      program_tcb('{dbg_se: 1'b1, default: 1'b0});
      ir(I_DBG_SCAN);
      jt_dr('0, L8, d8[r]);
      program_ac(AC_CHAIN64);
      program_cc('{stop8: 1'b1, stop64: 1'b1, dbg_clk64: 1'b1, default: 1'b0});
      ir(I_DBG_SCAN);
      jt_dr('0, L64, d64[r]);
      check(d8[r][L8-1:0] == d8[0][L8-1:0], $sformatf("run %0d (TCK half %0d ns): 8 MHz dump identical", r, HALVES[r % 8]));
      check(d64[r][L64-1:0] == d64[0][L64-1:0], $sformatf("run %0d: 64 MHz dump identical", r));
    end
    $display("runs=%0d stopped=%0d breakpoint-before-reset=%0d", RUNS, stops, early_hits);
    check(stops == RUNS, "every run stopped on the breakpoint");
    check(early_hits > 0, "some runs had the breakpoint fire before the reset");
    check(d8[0][L8-1:0] != '0, "dump not empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
