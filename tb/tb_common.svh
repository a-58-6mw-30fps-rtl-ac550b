// Shared testbench helpers: a check counter, a compare macro and the
// end-of-test report line.
int checks = 0;
int failures = 0;

`define CHECK(cond, msg) \
  begin \
    checks++; \
    if (!(cond)) begin \
      failures++; \
      $display("FAIL %s (line %0d)", msg, `__LINE__); \
    end \
  end

`define FINISH \
  begin \
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); \
    $finish; \
  end

`define WATCHDOG(clk, n) \
  initial begin \
    repeat (n) @(posedge clk); \
    failures++; \
    $display("FAIL watchdog expired"); \
    `FINISH \
  end
