// tb_check.svh: shared check macro and watchdog for the testbenches.
// CHECK counts a check and, if the condition is false, a failure.
// WATCHDOG(n) ends the simulation with a failure after n clock cycles.
`ifndef TB_CHECK_SVH
`define TB_CHECK_SVH
`define CHECK(cond, msg) \
  begin checks++; if (!(cond)) begin failures++; if (failures < 10) $display("FAIL %s", msg); end end
`define WATCHDOG(n) \
  initial begin repeat (n) @(posedge clk); failures++; $display("watchdog expired"); \
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
`define FINISH \
  begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
`endif
