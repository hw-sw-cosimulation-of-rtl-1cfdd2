// Register block: reset values, write/read of each setting, outputs that
// follow the registers, live values, rearm pulse, event flags with
// enable, interrupt and write-1-to-clear.
module tb_cpu_iface;
  import mc_pkg::*;
  logic clk = 0, rst_n = 0;
  axil_req_t axi_req = '0;
  axil_rsp_t axi_rsp;
  logic selector, mem_mode, log_en, rearm, irq;
  logic [31:0] freq_word;
  logic [15:0] ampl, qdes;
  f32_t inv_qdes, inv_vdes;
  logic evt_half = 0, evt_full = 0, evt_snap = 0;
  logic [15:0] mem_ptr = 16'h0123;
  logic [95:0] adc = 96'h1111_2222_3333_4444_5555_6666;
  logic [47:0] dac = 48'hAAAA_BBBB_CCCC;
  kidx_t k_sel = 5'd17;
  `include "tb_check.svh"
  `TB_VARS
  `include "axil_tasks.svh"
  always #5 clk = ~clk;
  `WATCHDOG(20000)
  cpu_iface dut (.clk, .rst_n, .s_axi_req(axi_req), .s_axi_rsp(axi_rsp), .*);
  int nrearm = 0;
  always @(posedge clk) if (rearm) nrearm++;
  initial begin
    logic [31:0] d;
    logic [1:0] r;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    axi_read(32'h04, d, r); `CHECK(d == 32'd2147484, "FREQ reset: 50 Hz")
    axi_read(32'h08, d, r); `CHECK(d == 32'h8000, "AMPL reset")
    axi_write(32'h04, 32'h0100_0000, r); `CHECK(freq_word == 32'h0100_0000 && r == RESP_OKAY, "FREQ")
    axi_write(32'h08, 32'h4000, r);      `CHECK(ampl == 16'h4000, "AMPL")
    axi_write(32'h0C, 32'hFFFF_F000, r); `CHECK(qdes == 16'hF000, "QDES")
    axi_read(32'h0C, d, r);              `CHECK(d == 32'hFFFF_F000, "QDES sign-extended")
    axi_write(32'h10, 32'h3A83_126F, r); `CHECK(inv_qdes == 32'h3A83_126F, "INV_QDES")
    axi_write(32'h14, 32'h3800_0000, r); `CHECK(inv_vdes == 32'h3800_0000, "INV_VDES")
    axi_write(32'h00, 32'h7, r);         `CHECK(selector && mem_mode && log_en, "CTRL")
    axi_write(32'h00, 32'hD, r);         `CHECK(selector && !mem_mode && log_en && nrearm == 1, "rearm pulse")
    axi_read(32'h20, d, r); `CHECK(d == 32'h0123, "MEM_PTR")
    axi_read(32'h24, d, r); `CHECK(d == 32'h1111_2222, "ADC V1 V2")
    axi_read(32'h2C, d, r); `CHECK(d == 32'h5555_6666, "ADC I2 I3")
    axi_read(32'h34, d, r); `CHECK(d == 32'hCCCC_0000, "DAC ref3")
    axi_read(32'h38, d, r); `CHECK(d == 32'd17, "KSEL")
    @(posedge clk); evt_half <= 1; @(posedge clk); evt_half <= 0;
    repeat (3) @(posedge clk);
    `CHECK(!irq, "no irq while disabled")
    axi_read(32'h18, d, r); `CHECK(d == 32'h1, "half flag")
    axi_write(32'h1C, 32'h5, r);
    repeat (2) @(posedge clk);
    `CHECK(irq, "irq when enabled")
    axi_write(32'h18, 32'h1, r);
    repeat (2) @(posedge clk);
    `CHECK(!irq, "irq cleared")
    evt_snap <= 1; @(posedge clk); evt_snap <= 0; evt_full <= 1; @(posedge clk); evt_full <= 0;
    repeat (2) @(posedge clk);
    axi_read(32'h18, d, r); `CHECK(d == 32'h6, "snap and full flags")
    `CHECK(irq, "snap irq")
    `TB_DONE
  end
endmodule
