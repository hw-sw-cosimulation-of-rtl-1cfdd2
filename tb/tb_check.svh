// Common testbench helpers: check counting, result line and watchdog.
// Include inside a testbench module that has a `clk` signal.
`ifndef TB_CHECK_SVH
`define TB_CHECK_SVH
`define TB_VARS int checks = 0; int failures = 0;
`define CHECK(c, m) begin checks++; if (!(c)) begin failures++; $display("FAIL: %s @%0t", m, $time); end end
`define TB_DONE begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
`define WATCHDOG(n) initial begin repeat (n) @(posedge clk); failures++; $display("watchdog expired"); `TB_DONE end
`endif
// 2.0 raised to an integer power (real result).
function automatic real pow2(input int e);
  real r = 1.0;
  if (e >= 0) repeat (e) r = r * 2.0;
  else repeat (-e) r = r / 2.0;
  return r;
endfunction
