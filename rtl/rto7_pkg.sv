// rto7_pkg: types and constants shared by the RTO7 test and debug logic.
//
// Holds the TAP instruction codes, the field layout of the breakpoint
// control test point register (BC-TPR), the debug chain selection codes of
// the access control TPR (AC-TPR) and the data widths of the demodulator.
// The instruction names, the 204-bit BC-TPR length, the 20-bit width of
// observation points A and B, the 9-bit breakpoint counters and the -256
// default NCO frequency word follow the chip description. The instruction
// codes, the 4-bit instruction register, the 12-bit phase width and the
// bit order inside the TPRs are this design's own choices; the 12-bit
// reference of points C, D and E is the width that makes the five
// breakpoint modules fill exactly 204 bits.
package rto7_pkg;

  // ---------------- TAP ----------------
  localparam int unsigned IR_W = 4;

  typedef enum logic [IR_W-1:0] {
    I_EXTEST         = 4'b0000,
    I_SAMPLE         = 4'b0001,
    I_PROGRAM_TCB    = 4'b0010,
    I_PROGRAM_STATUS = 4'b0011,
    I_PROGRAM_DBG_CC = 4'b0100,
    I_PROGRAM_DBG_AC = 4'b0101,
    I_PROGRAM_DBG_BC = 4'b0110,
    I_DBG_RESET      = 4'b0111,
    I_DBG_SCAN       = 4'b1000,
    I_BYPASS         = 4'b1111
  } instr_e;

  typedef enum logic [3:0] {
    TLR  = 4'h0, RTI  = 4'h1, SDRS = 4'h2, CDR  = 4'h3,
    SDR  = 4'h4, E1DR = 4'h5, PDR  = 4'h6, E2DR = 4'h7,
    UDR  = 4'h8, SIRS = 4'h9, CIR  = 4'hA, SIR  = 4'hB,
    E1IR = 4'hC, PIR  = 4'hD, E2IR = 4'hE, UIR  = 4'hF
  } tap_state_e;

  // Data register access strobes, one TCK cycle each, valid at posedge TCK.
  typedef struct packed {
    logic capture;  // in Capture-DR
    logic shift;    // in Shift-DR
    logic update;   // in Update-DR
  } dr_ctl_t;

  // ---------------- demodulator widths ----------------
  localparam int unsigned AB_W    = 20;  // points A, B
  localparam int unsigned PH_W    = 12;  // phase / frequency, full circle = 2**PH_W
  localparam int unsigned CNT_W   = 9;   // breakpoint counters
  localparam int signed   F_DEFAULT = -256; // 500 kHz at 8 MHz sample rate

  // ---------------- BC-TPR layout ----------------
  // Control fields (shift + update), per module:
  //   A/B : lo[20] hi[20] en_cnt[1]          = 41 bits
  //   C/D/E: ref[12] en_gt[1] en_eq[1]       = 14 bits
  // Observe fields (capture + shift):
  //   A/B : flag[1] cnt[9]                   = 10 bits
  //   C/D/E: flag_gt flag_eq cnt_gt[9] cnt_eq[9] = 20 bits
  typedef struct packed {
    logic signed [AB_W-1:0] lo;
    logic signed [AB_W-1:0] hi;
    logic                   en_cnt;
  } bp_ab_ctl_t;

  typedef struct packed {
    logic signed [PH_W-1:0] ref_val;
    logic                   en_gt;
    logic                   en_eq;
  } bp_cde_ctl_t;

  typedef struct packed {
    logic             flag;
    logic [CNT_W-1:0] cnt;
  } bp_ab_obs_t;

  typedef struct packed {
    logic             flag_gt;
    logic             flag_eq;
    logic [CNT_W-1:0] cnt_gt;
    logic [CNT_W-1:0] cnt_eq;
  } bp_cde_obs_t;

  typedef struct packed {
    bp_ab_ctl_t  [1:0] ab;   // [0]=A, [1]=B
    bp_cde_ctl_t [2:0] cde;  // [0]=C, [1]=D, [2]=E
  } bc_ctl_t;

  typedef struct packed {
    bp_ab_obs_t  [1:0] ab;
    bp_cde_obs_t [2:0] cde;
  } bc_obs_t;

  localparam int unsigned BC_CTL_W = $bits(bc_ctl_t);  // 124
  localparam int unsigned BC_OBS_W = $bits(bc_obs_t);  // 80
  localparam int unsigned BC_W     = BC_CTL_W + BC_OBS_W; // 204

  // Reset value: all breakpoints in counting mode, A/B window = full range,
  // so that no clock stop is requested until the debugger programs one.
  function automatic bc_ctl_t bc_ctl_reset();
    bc_ctl_t c;
    for (int i = 0; i < 2; i++) begin
      c.ab[i].lo     = {1'b1, {(AB_W-1){1'b0}}};
      c.ab[i].hi     = {1'b0, {(AB_W-1){1'b1}}};
      c.ab[i].en_cnt = 1'b1;
    end
    for (int i = 0; i < 3; i++) begin
      c.cde[i].ref_val = '0;
      c.cde[i].en_gt   = 1'b1;
      c.cde[i].en_eq   = 1'b1;
    end
    return c;
  endfunction

  // ---------------- AC-TPR chain select ----------------
  typedef enum logic [1:0] {
    AC_BYPASS  = 2'd0,
    AC_CHAIN8  = 2'd1,
    AC_CHAIN64 = 2'd2,
    AC_BYPASS2 = 2'd3
  } ac_sel_e;

  // ---------------- CC-TPR layout ----------------
  localparam int unsigned CC_W = 6;
  typedef struct packed {
    logic stopped64;  // observe: 64 MHz domain held by breakpoint
    logic stopped8;   // observe: 8 MHz domain held by breakpoint
    logic dbg_clk64;  // give TCK pulses to the 64 MHz domain on debug scan
    logic dbg_clk8;   // give TCK pulses to the 8 MHz domain on debug scan
    logic stop64;     // stop the 64 MHz domain on a breakpoint
    logic stop8;      // stop the 8 MHz domain on a breakpoint
  } cc_t;

  // ---------------- TCB layouts ----------------
  // Global TCB
  localparam int unsigned GTCB_W = 2;
  typedef struct packed {
    logic test_mode;   // chip in structural scan test: TDI acts as scan enable
    logic bs_extest;   // reserved: boundary scan drives pins (set by EXTEST too)
  } gtcb_t;

  // Local (core) TCB
  localparam int unsigned LTCB_W = 5;
  typedef struct packed {
    logic intest;      // wrapper cells drive the core inputs
    logic extest;      // wrapper cells drive the core outputs
    logic bypass;      // core bypass replaces the wrapper chain in the test scan path
    logic tck_en;      // test clock gate enable
    logic dbg_se;      // debug scan enable (demodulator only)
  } ltcb_t;

  localparam int unsigned APP_W = 32;  // application settings register
endpackage
