// tb_util.svh -- shared checking helpers for the modem testbenches.
// CHECK(cond, msg) counts one check and, on failure, one failure with a
// message. TB_FINISH prints the result line and ends the simulation.
`ifndef TB_UTIL_SVH
`define TB_UTIL_SVH
`define CHECK(cond, msg) \
  begin checks++; if (!(cond)) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end end
`define TB_FINISH \
  begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
`endif
