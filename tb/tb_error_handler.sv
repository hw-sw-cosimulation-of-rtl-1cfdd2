// Random references and values; checks the four differences and the
// one-cycle latency.
module tb_error_handler;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [18:0] q_ref;
  logic signed [15:0] q_act;
  logic signed [2:0][18:0] v_ref;
  logic signed [2:0][15:0] vk;
  logic signed [19:0] e_q;
  logic signed [2:0][19:0] e_v;
  logic done;
  `include "tb_check.svh"
  `TB_VARS
  always #5 clk = ~clk;
  `WATCHDOG(5000)
  error_handler dut (.*);
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 200; n++) begin
      automatic int qr = $urandom_range(0, 500000) - 250000, qa = $urandom_range(0, 65535) - 32768;
      int vr [3], vv [3];
      for (int j = 0; j < 3; j++) begin vr[j] = $urandom_range(0, 500000) - 250000; vv[j] = $urandom_range(0, 65535) - 32768; end
      q_ref <= 19'(qr); q_act <= 16'(qa);
      for (int j = 0; j < 3; j++) begin v_ref[j] <= 19'(vr[j]); vk[j] <= 16'(vv[j]); end
      en <= 1; @(posedge clk); en <= 0; #1;
      `CHECK(done, "done after one cycle")
      `CHECK(e_q == 20'(qr - qa), "e_q")
      for (int j = 0; j < 3; j++) `CHECK($signed(e_v[j]) == vr[j] - vv[j], $sformatf("e_v[%0d]", j))
      @(posedge clk); #1;
      `CHECK(!done, "done is a pulse")
    end
    `TB_DONE
  end
endmodule
