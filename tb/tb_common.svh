// Shared testbench bookkeeping: check counters, a check() helper and the
// result line. Included inside a testbench module.
int checks = 0, failures = 0;

function automatic void check(bit ok, string msg);
  checks++;
  if (!ok) begin
    failures++;
    $display("FAIL: %s", msg);
  end
endfunction

task automatic finish_tb();
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
endtask
