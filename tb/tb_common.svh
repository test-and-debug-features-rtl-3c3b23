// tb_common.svh: check counters and the result line shared by the testbenches.
int checks = 0;
int failures = 0;

task automatic check(input bit ok, input string msg);
  checks++;
  if (!ok) begin
    failures++;
    $display("FAIL: %s", msg);
  end
endtask

task automatic finish_tb();
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
endtask
