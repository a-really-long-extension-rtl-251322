// Shared testbench bookkeeping: check counters, the CHECK macro and the
// result line every testbench ends with.
`ifndef TB_COMMON_SVH
`define TB_COMMON_SVH
`define TB_DECLS int checks = 0; int failures = 0;
`define CHECK(cond, msg) begin checks++; if (!(cond)) begin failures++; $display("FAIL: %s", msg); end end
`define TB_FINISH begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
`endif
