// tb_util.svh: shared checking macros for the self-checking testbenches.
// Each testbench declares `int checks, failures;` and uses CHECK to compare
// a condition, printing the message on a mismatch.
`ifndef TB_UTIL_SVH
`define TB_UTIL_SVH
`define CHECK(cond, msg) \
  begin \
    checks++; \
    if (!(cond)) begin \
      failures++; \
      $display("FAIL %s (t=%0t)", msg, $time); \
    end \
  end
`define TB_END \
  begin \
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); \
    $finish; \
  end
`endif
