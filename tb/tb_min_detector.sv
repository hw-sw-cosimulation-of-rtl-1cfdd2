// Presents random cost sets (float bit patterns, with deliberate ties) and
// checks the index of the smallest, lower index on ties, 5 cycles after start.
module tb_min_detector;
  import mc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [26:0][31:0] cost;
  kidx_t k;
  logic [31:0] min_cost;
  logic vld;
  `include "tb_check.svh"
  `TB_VARS
  always #5 clk = ~clk;
  `WATCHDOG(50000)
  min_detector dut (.*);
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 500; n++) begin
      automatic int best = 0, lat = 0;
      for (int i = 0; i < 27; i++) cost[i] = {1'b0, 8'($urandom_range(120, 130)), 23'($urandom_range(0, (n % 2) ? 7 : 8388607))};
      if (n == 0) for (int i = 0; i < 27; i++) cost[i] = 32'h4000_0000 + 32'(i == 26 ? -1 : 0);
      for (int i = 1; i < 27; i++) if (cost[i] < cost[best]) best = i;
      start <= 1; @(posedge clk); start <= 0;
      #1; lat = 1; while (!vld && lat < 10) begin @(posedge clk); #1; lat++; end
      `CHECK(lat == 5, "latency 5")
      `CHECK(k == 5'(best + 1), $sformatf("k %0d vs %0d", k, best + 1))
      `CHECK(min_cost == cost[best], "min cost")
    end
    `TB_DONE
  end
endmodule
