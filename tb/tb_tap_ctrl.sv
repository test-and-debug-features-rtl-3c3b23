// tb_tap_ctrl: self-checking test of the TAP controller. Walks the state
// machine (reset by TMS, paths through both columns), checks the captured
// IR pattern 0001, instruction decoding of every private instruction,
// one-cycle DR strobes, the one-bit bypass delay, the DR output path and
// the DBG_RESET output.
module tb_tap_ctrl;
  import rto7_pkg::*;
  `include "tb/tb_common.svh"
  localparam int JT_HALF = 10;
  logic tck = 0, trst_n = 1, tms = 1, tdi = 0, tdo, tdo_en, dr_tdo, dbg_reset;
  instr_e instr;
  dr_ctl_t dr_ctl;
  tap_state_e state;
  logic [3:0] cap;
  logic [1023:0] dout;
  int n_cap, n_upd, n_shift;
  logic [7:0] ext_sr;   // stand-in 8-bit data register
  `include "tb/jtag_tasks.svh"

  tap_ctrl dut (.tck, .trst_n, .tms, .tdi, .tdo, .tdo_en, .dr_tdo, .instr, .dr_ctl,
                .state, .dbg_reset);

  always_ff @(posedge tck) begin
    if (dr_ctl.capture) begin n_cap++; ext_sr <= 8'hA5; end
    if (dr_ctl.shift)   begin n_shift++; ext_sr <= {tdi, ext_sr[7:1]}; end
    if (dr_ctl.update)  n_upd++;
  end
  assign dr_tdo = ext_sr[0];

  initial begin #2000000; check(0, "watchdog"); finish_tb(); end

  initial begin
    logic d;
    #2 trst_n = 0;
    #20 trst_n = 1;
    check(state == TLR && instr == I_BYPASS, "async reset: TLR, BYPASS");
    jt_clk(0, 0, d);
    check(state == RTI, "TLR -> RTI");
    for (int i = 0; i < 5; i++) jt_clk(1, 0, d);
    check(state == TLR, "five TMS=1 reach TLR");
    jt_clk(0, 0, d);
    // instruction loads
    foreach (instr_list[k]) begin
      jt_ir(instr_list[k], cap);
      check(cap == 4'b0001, "IR capture pattern 0001");
      check(instr == instr_list[k], $sformatf("instruction %h loaded", instr_list[k]));
      check(dbg_reset == (instr_list[k] == I_DBG_RESET), "dbg_reset decode");
    end
    // DR strobes and data path (instruction SAMPLE uses dr_tdo)
    jt_ir(I_SAMPLE, cap);
    n_cap = 0; n_shift = 0; n_upd = 0;
    jt_dr(512'h3C, 8, dout);
    check(n_cap == 1 && n_upd == 1 && n_shift == 8, $sformatf("strobes c%0d s%0d u%0d", n_cap, n_shift, n_upd));
    check(dout[7:0] == 8'hA5, $sformatf("captured DR shifted out, got %h", dout[7:0]));
    check(ext_sr == 8'h3C, "TDI bits reached the DR");
    // Pause-DR path: Exit1 -> Pause -> Exit2 -> Shift continues
    jt_clk(1, 0, d); jt_clk(0, 0, d); jt_clk(0, 0, d);
    check(state == SDR, "in Shift-DR");
    jt_clk(1, 0, d); check(state == E1DR, "Exit1-DR");
    jt_clk(0, 0, d); check(state == PDR, "Pause-DR");
    jt_clk(1, 0, d); check(state == E2DR, "Exit2-DR");
    jt_clk(0, 0, d); check(state == SDR, "back to Shift-DR");
    jt_clk(1, 0, d); jt_clk(1, 0, d); check(state == UDR, "Update-DR");
    jt_clk(0, 0, d);
    // bypass: one-bit delay, captures 0
    jt_ir(I_BYPASS, cap);
    jt_dr(512'b1011_0110, 9, dout);
    check(dout[0] == 1'b0 && dout[8:1] == 8'b1011_0110, $sformatf("bypass delay got %h", dout[8:0]));
    jt_ir(I_DBG_RESET, cap);
    jt_dr(512'b1, 2, dout);
    check(dout[1] == 1'b1, "DBG_RESET uses the bypass register");
    check(tdo_en == 1'b0, "TDO disabled outside shift states");
    finish_tb();
  end

  instr_e instr_list[10] = '{I_EXTEST, I_SAMPLE, I_PROGRAM_TCB, I_PROGRAM_STATUS, I_PROGRAM_DBG_CC,
                             I_PROGRAM_DBG_AC, I_PROGRAM_DBG_BC, I_DBG_RESET, I_DBG_SCAN, I_BYPASS};
endmodule
