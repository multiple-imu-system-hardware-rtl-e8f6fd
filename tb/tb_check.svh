// Shared check macro for the self-checking testbenches: counts a check and,
// when the condition is false, a failure with a message.
`ifndef TB_CHECK_SVH
`define TB_CHECK_SVH
`define CHECK(c, msg) begin checks++; if (!(c)) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end end
`define FINISH begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
`endif
