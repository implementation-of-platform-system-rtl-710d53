// Common testbench helpers: check counting and the result line.
`ifndef TB_UTIL_SVH
`define TB_UTIL_SVH
`define TB_CHECK(cond, msg) \
  begin \
    checks++; \
    if (!(cond)) begin \
      failures++; \
      $display("FAIL %0t: %s", $time, msg); \
    end \
  end
`define TB_FINISH \
  begin \
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); \
    $finish; \
  end
`define TB_WATCHDOG(ncycles) \
  initial begin \
    repeat (ncycles) @(posedge clk); \
    failures++; \
    $display("FAIL: watchdog expired"); \
    `TB_FINISH \
  end
`endif
