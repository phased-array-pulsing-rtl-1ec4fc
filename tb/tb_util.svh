// tb_util.svh: shared test bench helpers.
// Declares the check and failure counters, a CHECK macro that counts one
// check and reports the first few failures, and a 100 MHz-style clock
// period used by every bench. Include it inside a test bench module.
int checks = 0;
int failures = 0;

`define CHECK(cond, msg) \
  begin \
    checks++; \
    if (!(cond)) begin \
      failures++; \
      if (failures <= 10) $display("FAIL @%0t: %s", $time, msg); \
    end \
  end

`define TB_FINISH \
  begin \
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); \
    $finish; \
  end
