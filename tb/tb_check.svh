// Shared check helper for the self-checking testbenches: counts a check and,
// if the condition is false, a failure with a message.
`ifndef TB_CHECK_SVH
`define TB_CHECK_SVH
`define CHECK(cond, msg) \
  begin \
    checks++; \
    if (!(cond)) begin \
      failures++; \
      $display("FAIL at %0t: %s", $time, msg); \
    end \
  end
`endif
