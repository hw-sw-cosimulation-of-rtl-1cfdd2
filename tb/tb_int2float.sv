// Converts random signed integers (32 and 40 bits) and compares with a
// bit-exact reference: exponent from the highest set bit, 23 bits below it
// truncated. Checks the 4-cycle latency.
module tb_int2float;
  import mc_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [31:0] x32;
  logic signed [39:0] x40;
  f32_t f32a, f40a;
  logic d32, d40;
  `include "tb_check.svh"
  `TB_VARS
  always #5 clk = ~clk;
  `WATCHDOG(20000)
  int2float #(.W(32)) dut32 (.clk, .rst_n, .en, .x(x32), .f(f32a), .done(d32));
  int2float #(.W(40)) dut40 (.clk, .rst_n, .en, .x(x40), .f(f40a), .done(d40));

  function automatic logic [31:0] ref_f(input longint v);
    longint m = v < 0 ? -v : v;
    int p = -1;
    logic [22:0] man;
    if (m == 0) return 32'd0;
    for (int b = 0; b < 63; b++) if (m[b]) p = b;
    if (p >= 23) man = 23'(m >> (p - 23)); else man = 23'(m << (23 - p));
    return {v < 0, 8'(127 + p), man};
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 300; n++) begin
      automatic longint a = longint'($signed($urandom)) >>> $urandom_range(0, 31);
      automatic longint b = (longint'($signed($urandom)) <<< 8 | longint'($urandom_range(0, 255))) >>> $urandom_range(0, 39);
      automatic int lat = 0;
      if (n == 0) begin a = 0; b = 0; end
      if (n == 1) begin a = 1; b = -1; end
      x32 <= 32'(a); x40 <= 40'(b);
      en <= 1; @(posedge clk); en <= 0;
      #1; lat = 1; while (!d32 && lat < 10) begin @(posedge clk); #1; lat++; end
      `CHECK(lat == 4, "latency 4")
      `CHECK(d40, "40-bit converter in step")
      `CHECK(f32a == ref_f(a), $sformatf("32-bit %0d -> %h vs %h", a, f32a, ref_f(a)))
      `CHECK(f40a == ref_f(b), $sformatf("40-bit %0d -> %h vs %h", b, f40a, ref_f(b)))
    end
    `TB_DONE
  end
endmodule
