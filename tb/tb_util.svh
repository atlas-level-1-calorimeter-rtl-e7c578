// Shared testbench helpers: a check counter and a watchdog.
// A testbench declares `int checks, failures;` through TB_COUNTERS and uses
// CHECK(cond, message) for every comparison with an independent reference.
`ifndef TB_UTIL_SVH
`define TB_UTIL_SVH
`define TB_COUNTERS int checks = 0; int failures = 0;
`define CHECK(cond, msg) \
  begin checks++; if (!(cond)) begin failures++; \
    if (failures <= 20) $display("FAIL %s (t=%0t)", msg, $time); end end
`define TB_FINISH \
  begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
`define WATCHDOG(clk, n) \
  initial begin repeat (n) @(posedge clk); failures++; \
    $display("FAIL watchdog expired"); `TB_FINISH end
`endif
