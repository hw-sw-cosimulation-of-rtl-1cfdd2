// Multiplies random floats and compares with a reference built from the
// exact 48-bit mantissa product (truncated); checks the 14-cycle latency
// and zero operands.
module tb_fpau_mult;
  import mc_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  f32_t a, b, p;
  logic done, busy;
  `include "tb_check.svh"
  `TB_VARS
  always #5 clk = ~clk;
  `WATCHDOG(50000)
  fpau_mult dut (.*);

  function automatic logic [31:0] ref_mul(input logic [31:0] x, input logic [31:0] y);
    longint unsigned mx = {1'b1, x[22:0]}, my = {1'b1, y[22:0]};
    longint unsigned pr = mx * my;
    int e = int'(x[30:23]) + int'(y[30:23]) - 127;
    if (x[30:23] == 0 || y[30:23] == 0) return 32'd0;
    if (pr[47]) return {x[31] ^ y[31], 8'(e + 1), pr[46:24]};
    return {x[31] ^ y[31], 8'(e), pr[45:23]};
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 300; n++) begin
      automatic logic [31:0] x = {1'($urandom), 8'($urandom_range(70, 180)), 23'($urandom)};
      automatic logic [31:0] y = {1'($urandom), 8'($urandom_range(70, 180)), 23'($urandom)};
      automatic int lat = 0;
      if (n == 0) x = 32'h3F80_0000;             // 1.0
      if (n == 1) y = 32'h0;                     // zero
      if (n == 2) begin x = 32'h3FFF_FFFF; y = 32'h3FFF_FFFF; end
      a <= x; b <= y;
      en <= 1; @(posedge clk); en <= 0;
      #1; lat = 1; while (!done && lat < 30) begin @(posedge clk); #1; lat++; end
      `CHECK(lat == 14, $sformatf("latency %0d", lat))
      `CHECK(p == ref_mul(x, y), $sformatf("%h * %h = %h vs %h", x, y, p, ref_mul(x, y)))
    end
    `TB_DONE
  end
endmodule
