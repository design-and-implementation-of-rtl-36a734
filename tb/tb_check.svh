// Shared checking macro for the testbenches: counts a check, and a failure
// with a message when the condition is false. Expects int checks, failures.
`ifndef TB_CHECK_SVH
`define TB_CHECK_SVH
`define CHECK(cond, msg) \
  begin \
    checks++; \
    if (!(cond)) begin \
      failures++; \
      $display("FAIL %s (time %0t)", msg, $time); \
    end \
  end
`endif
