// tb_util.svh: check counters and the CHECK macro shared by the testbenches.
// A testbench declares `int checks, failures;` and uses `CHECK(cond, msg).
`ifndef TB_UTIL_SVH
`define TB_UTIL_SVH
`define CHECK(cond, msg) \
  begin \
    checks++; \
    if (!(cond)) begin \
      failures++; \
      if (failures < 40) $display("FAIL t=%0t: %s", $time, msg); \
    end \
  end
`define TB_FINISH \
  begin \
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); \
    $finish; \
  end
`define WATCHDOG(cycles) \
  initial begin \
    repeat (cycles) @(posedge clk); \
    failures++; \
    $display("FAIL: watchdog expired"); \
    `TB_FINISH \
  end
`endif
