// Feeds the 32-bit LOD one value per cycle (back to back) and checks the
// one-hot of the leading one, 3 cycles later.
module tb_lod;
  logic clk = 0, rst_n = 0, vld_i = 0;
  logic [31:0] a = '0, onehot;
  logic vld_o;
  `include "tb_check.svh"
  `TB_VARS
  always #5 clk = ~clk;
  `WATCHDOG(5000)
  lod #(.W(32)) dut (.*);
  logic [31:0] exp_q [$];
  logic [31:0] stim [$];
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 500; n++) begin
      automatic logic [31:0] x = $urandom >> $urandom_range(0, 32);
      if (n < 33) x = (n == 32) ? 32'd0 : (32'd1 << n) | (($urandom) & ((32'd1 << n) - 1));
      stim.push_back(x);
    end
    foreach (stim[n]) begin
      automatic logic [31:0] e = '0;
      for (int b = 0; b < 32; b++) if (stim[n][b]) e = 32'd1 << b;
      exp_q.push_back(e);
      a <= stim[n]; vld_i <= 1;
      @(posedge clk);
    end
    vld_i <= 0;
    repeat (5) @(posedge clk);
    `CHECK(exp_q.size() == 0, "all results seen")
    `TB_DONE
  end
  always @(negedge clk) if (rst_n && vld_o) begin
    `CHECK(exp_q.size() > 0, "unexpected output")
    if (exp_q.size() > 0) `CHECK(onehot == exp_q.pop_front(), $sformatf("onehot %h", onehot))
  end
  int lat = 0, first_in = -1, cyc = 0;
  always @(negedge clk) begin
    cyc <= cyc + 1;
    if (vld_i && first_in < 0) first_in <= cyc;
    if (vld_o && lat == 0 && first_in >= 0) begin lat <= cyc - first_in; `CHECK(cyc - first_in == 3, "latency 3") end
  end
endmodule
