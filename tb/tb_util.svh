// tb_util.svh: shared check counting for the self-checking testbenches.
// CHECK(cond, msg) counts one check and, if cond is false, one failure.
`ifndef TB_UTIL_SVH
`define TB_UTIL_SVH
`define CHECK(cond, msg) \
  begin checks++; if (!(cond)) begin failures++; $display("FAIL %0t: %s", $time, msg); end end
`define TB_DONE \
  begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
`endif
