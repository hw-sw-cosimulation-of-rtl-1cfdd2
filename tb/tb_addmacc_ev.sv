// Random 18-bit errors; checks the sum of squares and the 4-cycle latency.
module tb_addmacc_ev;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [2:0][17:0] e;
  logic signed [36:0] ev2;
  logic done;
  `include "tb_check.svh"
  `TB_VARS
  always #5 clk = ~clk;
  `WATCHDOG(20000)
  addmacc_ev dut (.*);
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 300; n++) begin
      automatic longint s = 0; int lat = 0;
      for (int j = 0; j < 3; j++) begin
        automatic int a = (n == 0) ? -131072 : $urandom_range(0, 262143) - 131072;
        e[j] = 18'(a); s += longint'(a) * a;
      end
      en <= 1; @(posedge clk); en <= 0;
      #1; lat = 1; while (!done && lat < 10) begin @(posedge clk); #1; lat++; end
      `CHECK(lat == 4, "latency 4")
      `CHECK(longint'(ev2) == s, $sformatf("ev2 %0d vs %0d", ev2, s))
    end
    `TB_DONE
  end
endmodule
