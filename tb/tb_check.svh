// Common checking helpers of the testbenches: a check counter, a failure
// counter, the CHECK macro and a watchdog that ends a hung simulation.
`ifndef TB_CHECK_SVH
`define TB_CHECK_SVH
`define TB_COUNTERS int checks = 0; int failures = 0;
`define CHECK(c, msg) begin checks++; if (!(c)) begin failures++; $display("FAIL: %s", msg); end end
`define TB_DONE begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
`define WATCHDOG(clkname, n) initial begin repeat (n) @(posedge clkname); failures++; $display("watchdog expired"); `TB_DONE end
`endif
