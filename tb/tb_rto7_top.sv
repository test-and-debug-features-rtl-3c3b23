// tb_rto7_top: end-to-end test of the RTO7 test and debug design through
// its pins, at the design's default parameters. The testbench models the
// sigma-delta ADC (GFSK-like signal on the 500 kHz IF, restarted on each
// rising edge of the internal reset pin, as an application board would
// synchronise its stimulus) and acts as the TAP host. Sequence:
//   1. functional run: demodulated bits match the data sent;
//   2. application settings via pins and via PROGRAM_STATUS, power-down;
//   3. boundary scan SAMPLE and EXTEST;
//   4. debug scenario, twice: program a range breakpoint on point A,
//      DBG_RESET, run until the breakpoint stops the clocks, poll the
//      breakpoint flag through the BC-TPR, read the CC-TPR status, dump the
//      8 MHz and 64 MHz debug chains with DBG_SCAN, and the bypass chain.
//      The two runs' state dumps must be identical;
//   5. counting-mode breakpoint: no stop, the counter is read back;
//   6. structural test mode: the four pin scan chains have their lengths;
//   7. interconnect test: with EXTEST in the demodulator's TCB, its wrapper
//      output cell, loaded through pin scan chain 3, drives bit_out.
// Every mechanism is counted and must have happened at least once.
module tb_rto7_top;
  import rto7_pkg::*;
  `include "tb/tb_common.svh"
  localparam int JT_HALF = 10;
  localparam int L8 = 559;
  localparam int L64 = 66;
  localparam real PI = 3.14159265358979;

  logic tck = 0, tms = 1, tdi = 0, trst_n = 1, tdo, tdo_en;
  logic clk64 = 0, rst_n = 1, id = 0, qd = 0;
  logic as_sclk = 0, as_sdata = 0, as_sen = 0, as_ld = 0;
  logic bit_out, clk8_out, rst_out;
  logic [3:0] scan_in = '0, scan_out;
  logic [APP_W-1:0] app_q;
  logic [1023:0] dout;
  logic [3:0] cap;

  // mechanism counters
  int n_stop, n_dump8, n_dump64, n_bypass, n_dbg_reset, n_pd, n_pin_wr, n_tap_wr, n_sample,
      n_extest, n_count_mode, n_cc_status, n_testscan, n_demod, n_tcb, n_interconnect;

  rto7_top dut (.tck, .tms, .tdi, .trst_n, .tdo, .tdo_en, .clk64, .rst_n, .id, .qd,
                .as_sclk, .as_sdata, .as_sen, .as_ld, .bit_out, .clk8_out, .rst_out,
                .scan_in, .scan_out, .app_q);

  `include "tb/jtag_tasks.svh"

  always #8 clk64 = ~clk64;      // 62.5 MHz stands in for 64 MHz

  // ---------------- sigma-delta ADC model ----------------
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

  // gated domain clock activity, observed inside the chip
  int e8;
  always @(posedge dut.clk8_g) e8++;

  // ---------------- helpers ----------------
  task automatic ir(input instr_e i);
    jt_ir(i, cap);
    check(cap == 4'b0001, "IR capture 0001");
  endtask

  task automatic program_tcb(input gtcb_t g, input ltcb_t c, input ltcb_t d);
    ir(I_PROGRAM_TCB);
    jt_dr(1024'({g, c, d}), GTCB_W + 2 * LTCB_W, dout);
    n_tcb++;
  endtask

  task automatic program_cc(input cc_t v);
    ir(I_PROGRAM_DBG_CC);
    jt_dr(1024'(v), CC_W, dout);
  endtask

  task automatic program_ac(input ac_sel_e a);
    ir(I_PROGRAM_DBG_AC);
    jt_dr(1024'(a), 2, dout);
  endtask

  task automatic program_bc(input bc_ctl_t c, output bc_obs_t o);
    ir(I_PROGRAM_DBG_BC);
    jt_dr({'0, c, {BC_OBS_W{1'b0}}}, BC_W, dout);
    o = bc_obs_t'(dout[BC_OBS_W-1:0]);
  endtask

  task automatic pin_write(input logic [31:0] v);
    as_sen = 1;
    for (int i = 0; i < 32; i++) begin as_sdata = v[i]; #25 as_sclk = 1; #25 as_sclk = 0; end
    as_sen = 0;
    as_ld = 1; #25 as_sclk = 1; #25 as_sclk = 0; as_ld = 0;
  endtask

  task automatic wait_8(input int n);
    int s;
    s = e8;
    wait (e8 >= s + n);
  endtask

  // One debug run: breakpoint on A, DBG_RESET, stop, poll, dump.
  task automatic debug_run(output logic [1023:0] d8, output logic [1023:0] d64);
    bc_ctl_t c;
    bc_obs_t o;
    cc_t ccs;
    int polls;
    c = bc_ctl_reset();
    c.ab[0].lo = -20'sd60000;
    c.ab[0].hi = 20'sd60000;
    c.ab[0].en_cnt = 1'b0;
    program_tcb('0, '0, '0);
    program_cc('{stop8: 1'b1, stop64: 1'b1, default: 1'b0});
    program_bc(c, o);
    ir(I_DBG_RESET);
    n_dbg_reset++;
    jt_idle(20);
    check(!rst_out, "DBG_RESET holds the internal reset");
    ir(I_BYPASS);
    // poll the breakpoint flag through the BC-TPR capture
    polls = 0;
    do begin
      jt_idle(50);
      program_bc(c, o);
      polls++;
    end while (!o.ab[0].flag && polls < 200);
    check(o.ab[0].flag, "breakpoint A hit (BC-TPR flag)");
    if (o.ab[0].flag) n_stop++;
    ir(I_PROGRAM_DBG_CC);
    jt_dr(1024'(6'b000011), CC_W, dout);
    ccs = cc_t'(dout[CC_W-1:0]);
    check(ccs.stopped8 && ccs.stopped64, "CC-TPR reports both domains stopped");
    if (ccs.stopped8) n_cc_status++;
    begin
      int s;
      s = e8;
      jt_idle(100);
      check(e8 == s, "8 MHz domain frozen");
    end
    // state dump, 8 MHz chain
    program_ac(AC_CHAIN8);
    program_cc('{stop8: 1'b1, stop64: 1'b1, dbg_clk8: 1'b1, default: 1'b0});
    program_tcb('0, '0, '{dbg_se: 1'b1, default: 1'b0});
    ir(I_DBG_SCAN);
    jt_dr('0, L8, d8);
    n_dump8++;
    // 64 MHz chain
    program_ac(AC_CHAIN64);
    program_cc('{stop8: 1'b1, stop64: 1'b1, dbg_clk64: 1'b1, default: 1'b0});
    ir(I_DBG_SCAN);
    jt_dr('0, L64, d64);
    n_dump64++;
    // bypass chain: one bit
    program_ac(AC_BYPASS);
    ir(I_DBG_SCAN);
    jt_dr(1024'b1011, 5, dout);
    check(dout[4:1] == 4'b1011, "debug bypass chain is one bit");
    n_bypass++;
    program_tcb('0, '0, '0);
  endtask

  initial begin #50000000; check(0, "watchdog"); finish_tb(); end

  initial begin
    logic [1023:0] a8, a64, b8, b64;
    for (int k = 0; k < 256; k++) data[k] = (k % 2 == 0) ? 1'($urandom) : !data[k - 1];
    #1 trst_n = 0; rst_n = 0;
    #100 trst_n = 1;
    jt_reset();
    #200 rst_n = 1;
    // ---- 1. functional run ----
    begin
      bit rec[$];
      int best;
      wait (rst_out);
      for (int k = 0; k < 8 * 150; k++) begin
        @(posedge dut.clk8_g);
        rec.push_back(bit_out);
      end
      best = 0;
      for (int d = 0; d < 64; d++) begin
        int m;
        m = 0;
        for (int s = 50; s < 140; s++) if (rec[s * 8 + d] == data[s]) m++;
        if (m > best) best = m;
      end
      check(best >= 86, $sformatf("demodulated %0d of 90 symbols", best));
      if (best >= 86) n_demod++;
    end
    // ---- 2. application settings ----
    pin_write(32'h0000_0001);
    check(app_q == 32'h1, "settings written from pins");
    n_pin_wr++;
    begin
      int s;
      #500 s = e8;
      #2000;
      check(e8 == s, "power-down stops the 8 MHz domain");
      n_pd++;
    end
    ir(I_PROGRAM_STATUS);
    jt_dr(1024'(32'hA5A5_0000), 32, dout);
    check(dout[31:0] == 32'h1, "PROGRAM_STATUS reads back the pin-written value");
    check(app_q == 32'hA5A5_0000, "settings written from the TAP");
    n_tap_wr++;
    begin
      int s;
      #500 s = e8;
      #2000;
      check(e8 > s + 10, "clocks resume after power-down cleared");
    end
    // ---- 3. boundary scan ----
    as_sclk = 1; as_sdata = 0; as_sen = 1; as_ld = 0;
    ir(I_SAMPLE);
    jt_dr(1024'(7'b0000000), 7, dout);
    // dout[0] = last cell (rst_out pin), order MSB first
    check(dout[6:3] == 4'b1010, $sformatf("SAMPLE sees input pins, got %b", dout[6:0]));
    n_sample++;
    as_sclk = 0; as_sen = 0;
    jt_dr(1024'(7'b000_0101), 7, dout);   // first bits shifted land in the output cells
    ir(I_EXTEST);
    #50;
    check({rst_out, clk8_out, bit_out} == 3'b101, $sformatf("EXTEST drives output pins, got %b", {rst_out, clk8_out, bit_out}));
    n_extest++;
    ir(I_BYPASS);
    // ---- 4. debug runs ----
    debug_run(a8, a64);
    debug_run(b8, b64);
    check(a8[L8-1:0] == b8[L8-1:0], "8 MHz state dumps of two runs identical");
    check(a64[L64-1:0] == b64[L64-1:0], "64 MHz state dumps of two runs identical");
    check(a8[L8-1:0] != '0, "state dump is not empty");
    // ---- 5. counting mode ----
    begin
      bc_ctl_t c;
      bc_obs_t o;
      c = bc_ctl_reset();
      c.ab[0].lo = -20'sd60000;
      c.ab[0].hi = 20'sd60000;
      c.ab[0].en_cnt = 1'b1;
      program_bc(c, o);
      ir(I_DBG_RESET);
      jt_idle(20);
      ir(I_BYPASS);
      jt_idle(400);
      program_bc(c, o);
      check(o.ab[0].cnt > 0, $sformatf("counting breakpoint counted %0d cycles", o.ab[0].cnt));
      begin
        int s;
        s = e8;
        jt_idle(200);
        check(e8 > s + 10, "counting mode does not stop the clocks");
      end
      if (o.ab[0].cnt > 0) n_count_mode++;
    end
    // ---- 6. structural test mode ----
    program_tcb('{test_mode: 1'b1, default: 1'b0}, '{tck_en: 1'b1, default: 1'b0}, '0);
    begin
      int len[4];
      logic d;
      // TAP stays in Run-Test/Idle (TMS low); TDI high = shift
      for (int i = 0; i < 600; i++) jt_clk(1'b0, 1'b1, d);
      scan_in = 4'hF;
      jt_clk(1'b0, 1'b1, d);
      scan_in = 4'h0;
      len = '{0, 0, 0, 0};
      for (int i = 1; i < 600; i++) begin
        for (int k = 0; k < 4; k++) if (scan_out[k] && len[k] == 0) len[k] = i;
        jt_clk(1'b0, 1'b1, d);
      end
      check(len[0] == 482, $sformatf("pin scan chain 0 length %0d", len[0]));
      check(len[1] == 77,  $sformatf("pin scan chain 1 length %0d", len[1]));
      check(len[2] == 66 + 6, $sformatf("pin scan chain 2 length %0d", len[2]));
      check(len[3] == 3 + 2 + CC_W, $sformatf("pin scan chain 3 length %0d", len[3]));
      if (len[0] == 482) n_testscan++;
    end
    // ---- 7. interconnect test: the demodulator's wrapper drives its output ----
    program_tcb('{test_mode: 1'b1, default: 1'b0}, '{tck_en: 1'b1, default: 1'b0},
                '{extest: 1'b1, default: 1'b0});
    for (int v = 0; v < 2; v++) begin
      logic d;
      // the bit shifted in third from last ends in the demodulator's output cell
      scan_in[3] = 1'(v); jt_clk(1'b0, 1'b1, d);
      scan_in[3] = 1'(!v); jt_clk(1'b0, 1'b1, d);
      jt_clk(1'b0, 1'b1, d);
      #50;
      check(bit_out == 1'(v), $sformatf("wrapper EXTEST drives bit_out to %0d", v));
      if (bit_out == 1'(v)) n_interconnect++;
    end
    // ---- mechanism coverage ----
    $display("mechanisms: stop=%0d dump8=%0d dump64=%0d bypass=%0d dbg_reset=%0d pd=%0d pin_wr=%0d tap_wr=%0d sample=%0d extest=%0d count=%0d cc_status=%0d testscan=%0d demod=%0d tcb=%0d interconnect=%0d",
             n_stop, n_dump8, n_dump64, n_bypass, n_dbg_reset, n_pd, n_pin_wr, n_tap_wr, n_sample,
             n_extest, n_count_mode, n_cc_status, n_testscan, n_demod, n_tcb, n_interconnect);
    check(n_stop > 0, "breakpoint stop happened");
    check(n_dump8 > 0 && n_dump64 > 0, "state dumps happened");
    check(n_bypass > 0, "debug bypass used");
    check(n_dbg_reset > 0, "DBG_RESET used");
    check(n_pd > 0, "power-down happened");
    check(n_pin_wr > 0 && n_tap_wr > 0, "settings written from pins and TAP");
    check(n_sample > 0 && n_extest > 0, "boundary scan used");
    check(n_count_mode > 0, "counting mode used");
    check(n_cc_status > 0, "CC-TPR status read");
    check(n_testscan > 0, "test mode scan used");
    check(n_demod > 0, "demodulation checked");
    check(n_tcb > 0, "TCB programmed");
    check(n_interconnect == 2, "interconnect test through the wrapper");
    finish_tb();
  end
endmodule
