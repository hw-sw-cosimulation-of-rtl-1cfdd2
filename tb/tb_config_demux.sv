// Writes results for random slots and checks that exactly that register of
// the nine changes.
module tb_config_demux;
  import mc_pkg::*;
  logic clk = 0, rst_n = 0, done = 0;
  logic [3:0] slot;
  f32_t cost;
  logic signed [15:0] q_act;
  logic [8:0][31:0] cost_o;
  logic [8:0][15:0] q_o;
  `include "tb_check.svh"
  `TB_VARS
  always #5 clk = ~clk;
  `WATCHDOG(5000)
  config_demux dut (.*);
  logic [31:0] mc [9];
  logic [15:0] mq [9];
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    for (int s = 0; s < 9; s++) begin
      mc[s] = 32'h7F7F_FFFF; mq[s] = 0;
      `CHECK(cost_o[s] == mc[s], "reset value")
    end
    for (int n = 0; n < 100; n++) begin
      automatic int s = $urandom_range(0, 8);
      automatic logic d = 1'($urandom);
      slot <= 4'(s); cost <= $urandom; q_act <= 16'($urandom); done <= d;
      @(posedge clk); done <= 0; #1;
      if (d) begin mc[s] = cost; mq[s] = q_act; end
      for (int t = 0; t < 9; t++) `CHECK(cost_o[t] == mc[t] && q_o[t] == mq[t], $sformatf("slot %0d", t))
    end
    `TB_DONE
  end
endmodule
