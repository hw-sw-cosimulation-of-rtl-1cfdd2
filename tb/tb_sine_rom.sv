// Reads every entry of the sine table and compares it with 31250*sin(2*pi*i/1024).
module tb_sine_rom;
  logic clk = 0;
  logic [9:0] addr = '0;
  logic signed [15:0] dout;
  `include "tb_check.svh"
  `TB_VARS
  always #5 clk = ~clk;
  `WATCHDOG(5000)
  sine_rom #(.AW(10)) dut (.*);
  initial begin
    for (int i = 0; i < 1024; i++) begin
      real r;
      addr <= 10'(i);
      @(posedge clk); #1;
      r = 31250.0 * $sin(2.0 * 3.14159265358979 * i / 1024.0);
      `CHECK($itor(dout) - r <= 0.51 && r - $itor(dout) <= 0.51, $sformatf("entry %0d = %0d", i, dout))
    end
    `TB_DONE
  end
endmodule
