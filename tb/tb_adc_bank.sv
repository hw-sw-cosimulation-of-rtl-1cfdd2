// Drives the six ADC inputs with constant and alternating bitstreams and
// checks the data_ready rate (one per R enables) and the channel packing.
module tb_adc_bank;
  localparam int R = 200;
  logic clk = 0, rst_n = 0, ce = 0;
  logic [5:0] bs = '0;
  logic [95:0] data_out;
  logic data_ready;
  `include "tb_check.svh"
  `TB_VARS
  always #5 clk = ~clk;
  `WATCHDOG(20000)

  adc_bank #(.R(R)) dut (.*);

  int ce_count = 0, last_rdy = -1, nrdy = 0;
  always @(posedge clk) if (rst_n && ce) ce_count <= ce_count + 1;
  always @(posedge clk) if (rst_n) begin
    ce <= ~ce;                                  // enable every other cycle
    if (ce) bs <= {1'b1, 1'b1, ~bs[3], 1'b0, ~bs[1], 1'b0};
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    while (nrdy < 8) begin
      @(posedge clk); #1;
      if (data_ready) begin
        if (last_rdy >= 0) `CHECK(ce_count - last_rdy == R, "data_ready every R bit enables")
        last_rdy = ce_count;
        nrdy++;
        if (nrdy >= 4) begin
          `CHECK($signed(data_out[95:80]) == 31250, "V1 full scale positive")
          `CHECK($signed(data_out[79:64]) == 31250, "V2 full scale positive")
          `CHECK(($signed(data_out[63:48]) >= -16'sd2 && $signed(data_out[63:48]) <= 16'sd2), $sformatf("V3 alternating is near zero: %0d", $signed(data_out[63:48])))
          `CHECK($signed(data_out[47:32]) == -31250, "I1 full scale negative")
          `CHECK(($signed(data_out[31:16]) >= -16'sd2 && $signed(data_out[31:16]) <= 16'sd2), "I2 alternating is near zero")
          `CHECK($signed(data_out[15:0]) == -31250, "I3 full scale negative")
        end
      end
    end
    `TB_DONE
  end
endmodule
