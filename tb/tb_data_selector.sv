// Builds records in both formats from random inputs and checks every field
// at the bit positions of the log format.
module tb_data_selector;
  logic clk = 0, rst_n = 0, load = 0, selector = 0;
  logic [95:0] adc;
  logic [47:0] dac;
  logic [5:0] out_conf;
  logic [15:0] extra_in;
  logic [127:0] pkt;
  logic vld;
  `include "tb_check.svh"
  `TB_VARS
  always #5 clk = ~clk;
  `WATCHDOG(5000)
  data_selector dut (.*);
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 100; n++) begin
      logic [15:0] w [6], d [3];
      for (int c = 0; c < 6; c++) w[c] = 16'($urandom);
      for (int c = 0; c < 3; c++) d[c] = 16'($urandom);
      adc = {w[0], w[1], w[2], w[3], w[4], w[5]};
      dac = {d[0], d[1], d[2]};
      out_conf = 6'($urandom); extra_in = 16'($urandom); selector = n[0];
      load <= 1; @(posedge clk); load <= 0; #1;
      `CHECK(vld, "vld one cycle after load")
      if (!selector) begin
        for (int c = 0; c < 6; c++) `CHECK(pkt[127 - 16*c -: 16] == w[c], "format 1 ADC word")
      end else begin
        for (int c = 0; c < 3; c++) `CHECK(pkt[127 - 16*c -: 16] == w[c], "format 2 ADC word")
        for (int c = 0; c < 3; c++) `CHECK(pkt[79 - 16*c -: 16] == d[c], "format 2 DAC word")
      end
      `CHECK(pkt[31] == 1'b0, "zero bit")
      for (int c = 0; c < 6; c++) `CHECK(pkt[30 - c] == w[c][15], "ADC sign")
      `CHECK(pkt[24:22] == {d[0][15], d[1][15], d[2][15]}, "DAC signs")
      `CHECK(pkt[21:16] == out_conf, "OUT_CONF")
      `CHECK(pkt[15:0] == extra_in, "EXTRA_IN")
      @(posedge clk);
    end
    `TB_DONE
  end
endmodule
