// Random operands; checks q_adc = sum dv*ik (saturated to 35 bits), q_act =
// its 16 MSBs, and the 4-cycle latency.
module tb_addmacc_dsp;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [2:0][16:0] dv;
  logic signed [2:0][17:0] ik;
  logic signed [34:0] q_adc;
  logic signed [15:0] q_act;
  logic done;
  `include "tb_check.svh"
  `TB_VARS
  always #5 clk = ~clk;
  `WATCHDOG(20000)
  addmacc_dsp dut (.*);
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 300; n++) begin
      automatic longint s = 0; int lat = 0;
      for (int j = 0; j < 3; j++) begin
        automatic int a = (n < 5) ? 65535 : $urandom_range(0, 131070) - 65535;
        automatic int b = (n < 5) ? 131071 : $urandom_range(0, 262142) - 131071;
        dv[j] = 17'(a); ik[j] = 18'(b); s += longint'(a) * b;
      end
      if (s > 64'sd17179869183) s = 64'sd17179869183;
      if (s < -64'sd17179869184) s = -64'sd17179869184;
      en <= 1; @(posedge clk); en <= 0;
      #1; lat = 1; while (!done && lat < 10) begin @(posedge clk); #1; lat++; end
      `CHECK(lat == 4, "latency 4")
      `CHECK(q_adc == 35'(s), $sformatf("q_adc %0d vs %0d", q_adc, s))
      `CHECK(q_act == 16'(s >>> 19), "q_act = 16 MSBs")
    end
    `TB_DONE
  end
endmodule
