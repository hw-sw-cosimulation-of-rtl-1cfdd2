// Steps the synthesizer with a known phase increment and compares the three
// outputs with 31250*ampl*sin(phase + 0/120/240 degrees); checks the
// 5-cycle latency and the amplitude scaling.
module tb_dds_fs;
  logic clk = 0, rst_n = 0, step = 0;
  logic [31:0] freq_word;
  logic [15:0] ampl;
  logic [47:0] dac_value;
  logic valid;
  `include "tb_check.svh"
  `TB_VARS
  always #5 clk = ~clk;
  `WATCHDOG(20000)
  dds_fs dut (.*);

  function automatic real expect_ph(input longint acc, input int j, input real a);
    longint pa = (acc + (j == 0 ? 0 : j == 1 ? 64'd1431655765 : 64'd2863311530)) & 64'hFFFF_FFFF;
    return a * 31250.0 * $sin(2.0 * 3.14159265358979 * real'(pa >> 22) / 1024.0);
  endfunction

  initial begin
    automatic longint acc = 0;
    real a;
    freq_word = 32'd37 << 22 | 32'h1234;
    ampl = 16'h8000;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int s = 0; s < 60; s++) begin
      automatic int lat = 0;
      if (s == 30) ampl = 16'h4000;
      a = real'(ampl) / 32768.0;
      step <= 1; @(posedge clk); step <= 0;
      acc = (acc + freq_word) & 64'hFFFF_FFFF;
      #1; lat = 1; while (!valid && lat < 20) begin @(posedge clk); #1; lat++; end
      `CHECK(lat == 5, $sformatf("valid %0d cycles after step", lat))
      for (int j = 0; j < 3; j++) begin
        automatic real e = expect_ph(acc, j, a);
        automatic real g = $itor($signed(dac_value[47 - 16*j -: 16]));
        `CHECK(g - e < 2.0 && e - g < 2.0, $sformatf("phase %0d: %0.1f vs %0.1f", j, g, e))
      end
      repeat (3) @(posedge clk);
    end
    `TB_DONE
  end
endmodule
