// tb_check.svh: check counting shared by the unit testbenches. Included
// inside a testbench module; provides checks/failures, check() and finish().
int checks = 0, failures = 0;
task automatic check(input bit ok, input string what);
  checks++;
  if (!ok) begin
    failures++;
    $display("FAIL: %s", what);
  end
endtask
task automatic finish();
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
endtask
