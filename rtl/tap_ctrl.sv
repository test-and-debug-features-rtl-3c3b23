// tap_ctrl: IEEE 1149.1 test access port controller with the RTO7 private
// instructions.
//
// The 16-state TAP state machine runs on TCK, with TMS sampled at the
// rising edge and TRST_N as an asynchronous reset. A 4-bit instruction
// register selects BYPASS, the boundary scan instructions EXTEST and
// SAMPLE, and the private instructions PROGRAM_TCB, PROGRAM_STATUS,
// PROGRAM_DBG_CC, PROGRAM_DBG_AC, PROGRAM_DBG_BC, DBG_RESET and DBG_SCAN.
// The instruction list follows the chip description except DBG_SCAN, this
// design's name for the instruction that shifts the debug chain out on TDO.
//
// Interface: dr_ctl carries one-TCK-cycle Capture-DR, Shift-DR and
// Update-DR indications, qualified by the current instruction in the
// register that owns each instruction. dr_tdo is the serial output of the
// selected data register; the bypass register is inside. TDO is retimed
// on the falling edge of TCK as the standard requires. dbg_reset is high
// while DBG_RESET is the current instruction (functional reset from the TAP).
//
// Capture of observe registers: capture is asserted in the Capture-DR
// state for every instruction, so a register with a capture path (the
// BC-TPR) loads its observed values there, and hold is released from
// Capture-DR onward rather than only in Shift-DR.
module tap_ctrl
  import rto7_pkg::*;
(
  input  logic    tck,
  input  logic    trst_n,
  input  logic    tms,
  input  logic    tdi,
  output logic    tdo,
  output logic    tdo_en,
  input  logic    dr_tdo,
  output instr_e  instr,
  output dr_ctl_t dr_ctl,
  output tap_state_e state,
  output logic    dbg_reset
);

  tap_state_e nxt;
  logic [IR_W-1:0] ir_sh;
  logic bypass_q;

  always_comb begin
    unique case (state)
      TLR:  nxt = tms ? TLR  : RTI;
      RTI:  nxt = tms ? SDRS : RTI;
      SDRS: nxt = tms ? SIRS : CDR;
      CDR:  nxt = tms ? E1DR : SDR;
      SDR:  nxt = tms ? E1DR : SDR;
      E1DR: nxt = tms ? UDR  : PDR;
      PDR:  nxt = tms ? E2DR : PDR;
      E2DR: nxt = tms ? UDR  : SDR;
      UDR:  nxt = tms ? SDRS : RTI;
      SIRS: nxt = tms ? TLR  : CIR;
      CIR:  nxt = tms ? E1IR : SIR;
      SIR:  nxt = tms ? E1IR : SIR;
      E1IR: nxt = tms ? UIR  : PIR;
      PIR:  nxt = tms ? E2IR : PIR;
      E2IR: nxt = tms ? UIR  : SIR;
      UIR:  nxt = tms ? SDRS : RTI;
      default: nxt = TLR;
    endcase
  end

  always_ff @(posedge tck or negedge trst_n)
    if (!trst_n) state <= TLR;
    else         state <= nxt;

  // Instruction register: capture 0001, shift LSB first, update in Update-IR.
  always_ff @(posedge tck or negedge trst_n)
    if (!trst_n) ir_sh <= '0;
    else if (state == CIR) ir_sh <= 4'b0001;
    else if (state == SIR) ir_sh <= {tdi, ir_sh[IR_W-1:1]};

  // The instruction changes on the falling edge in Update-IR; Test-Logic-Reset selects BYPASS.
  always_ff @(negedge tck or negedge trst_n)
    if (!trst_n)            instr <= I_BYPASS;
    else if (state == TLR)  instr <= I_BYPASS;
    else if (state == UIR)  instr <= instr_e'(ir_sh);

  assign dr_ctl.capture = (state == CDR);
  assign dr_ctl.shift   = (state == SDR);
  assign dr_ctl.update  = (state == UDR);

  always_ff @(posedge tck or negedge trst_n)
    if (!trst_n) bypass_q <= 1'b0;
    else if (state == CDR) bypass_q <= 1'b0;
    else if (state == SDR) bypass_q <= tdi;

  logic tdo_d, uses_bypass;
  // BYPASS, DBG_RESET and unused codes connect the 1-bit bypass register.
  assign uses_bypass = !(instr inside {I_EXTEST, I_SAMPLE, I_PROGRAM_TCB, I_PROGRAM_STATUS,
                                       I_PROGRAM_DBG_CC, I_PROGRAM_DBG_AC, I_PROGRAM_DBG_BC,
                                       I_DBG_SCAN});
  always_comb begin
    if (state == SIR) tdo_d = ir_sh[0];
    else if (uses_bypass) tdo_d = bypass_q;
    else tdo_d = dr_tdo;
  end

  always_ff @(negedge tck or negedge trst_n)
    if (!trst_n) begin
      tdo <= 1'b0;
      tdo_en <= 1'b0;
    end else begin
      tdo    <= tdo_d;
      tdo_en <= (state == SIR) || (state == SDR);
    end

  assign dbg_reset = (instr == I_DBG_RESET);
endmodule
