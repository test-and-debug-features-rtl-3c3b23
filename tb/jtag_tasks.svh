// jtag_tasks.svh: TAP host tasks. Expects tck, tms, tdi, tdo at module
// scope and a TCK half period of JT_HALF time units. TDO is sampled just
// before the rising edge, as a 1149.1 host does.
task automatic jt_clk(input logic tms_v, input logic tdi_v, output logic tdo_v);
  tms = tms_v;
  tdi = tdi_v;
  #(JT_HALF);
  tdo_v = tdo;
  tck = 1'b1;
  #(JT_HALF);
  tck = 1'b0;
endtask

task automatic jt_reset();
  logic d;
  for (int i = 0; i < 5; i++) jt_clk(1'b1, 1'b0, d);
  jt_clk(1'b0, 1'b0, d);                  // Run-Test/Idle
endtask

task automatic jt_idle(input int n);
  logic d;
  for (int i = 0; i < n; i++) jt_clk(1'b0, 1'b0, d);
endtask

// Load an instruction; returns the captured IR value shifted out.
task automatic jt_ir(input logic [3:0] ins, output logic [3:0] cap);
  logic d;
  jt_clk(1'b1, 1'b0, d);                  // Select-DR
  jt_clk(1'b1, 1'b0, d);                  // Select-IR
  jt_clk(1'b0, 1'b0, d);                  // Capture-IR
  jt_clk(1'b0, 1'b0, d);                  // Shift-IR
  for (int i = 0; i < 4; i++) jt_clk(i == 3, ins[i], cap[i]);
  jt_clk(1'b1, 1'b0, d);                  // Update-IR
  jt_clk(1'b0, 1'b0, d);                  // Run-Test/Idle
endtask

// Capture, shift n bits (LSB first) and update a data register.
task automatic jt_dr(input logic [1023:0] din, input int n, output logic [1023:0] dout);
  logic d;
  dout = '0;
  jt_clk(1'b1, 1'b0, d);                  // Select-DR
  jt_clk(1'b0, 1'b0, d);                  // Capture-DR
  jt_clk(1'b0, 1'b0, d);                  // Shift-DR
  for (int i = 0; i < n; i++) jt_clk(i == n - 1, din[i], dout[i]);
  jt_clk(1'b1, 1'b0, d);                  // Update-DR
  jt_clk(1'b0, 1'b0, d);                  // Run-Test/Idle
endtask
