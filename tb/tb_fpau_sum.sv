// Adds random non-negative floats; compares with the real-valued sum within
// the truncation error (2^-22 relative), checks +0 operands and the
// 2-cycle latency.
module tb_fpau_sum;
  import mc_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  f32_t a, b, s;
  logic done;
  `include "tb_check.svh"
  `TB_VARS
  always #5 clk = ~clk;
  `WATCHDOG(20000)
  fpau_sum dut (.*);

  function automatic real f2r(input logic [31:0] f);
    if (f[30:23] == 0) return 0.0;
    return (1.0 + real'(f[22:0]) / 8388608.0) * pow2(int'(f[30:23]) - 127);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 400; n++) begin
      automatic logic [31:0] x = {1'b0, 8'($urandom_range(100, 150)), 23'($urandom)};
      automatic logic [31:0] y = {1'b0, 8'($urandom_range(100, 150)), 23'($urandom)};
      real r, g;
      automatic int lat = 0;
      if (n == 0) y = 32'h0;
      if (n == 1) begin x = 32'h0; y = 32'h0; end
      if (n == 2) begin x = 32'h3F80_0000; y = 32'h3F80_0000; end
      a <= x; b <= y;
      en <= 1; @(posedge clk); en <= 0;
      #1; lat = 1; while (!done && lat < 10) begin @(posedge clk); #1; lat++; end
      `CHECK(lat == 2, "latency 2")
      r = f2r(x) + f2r(y); g = f2r(s);
      `CHECK(s[31] == 1'b0, "sign 0")
      if (r == 0.0) `CHECK(s == 32'h0, "zero sum")
      else `CHECK((r - g) / r < 2.5e-7 && (g - r) / r < 1e-9, $sformatf("%h + %h = %h", x, y, s))
      if (n == 0) `CHECK(s == x, "x + 0 = x")
      if (n == 2) `CHECK(s == 32'h4000_0000, "1 + 1 = 2")
    end
    `TB_DONE
  end
endmodule
