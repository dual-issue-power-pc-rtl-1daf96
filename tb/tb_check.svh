// Shared check macro for the testbenches: counts a check and, if the
// condition is false, a failure with the source line.
`ifndef TB_CHECK_SVH
`define TB_CHECK_SVH
`define CHK(c) begin checks++; if (!(c)) begin failures++; $display("check failed at %s:%0d", `__FILE__, `__LINE__); end end
`define TB_END begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
`endif
