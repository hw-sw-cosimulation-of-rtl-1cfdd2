// UART with TX looped back to RX: bytes written over AXI come back in the
// RX FIFO; checks bit time, status bits and the FIFO interrupt. A byte is
// also received from a serial waveform generated here.
module tb_uart;
  import mc_pkg::*;
  localparam int CPB = 6;
  logic clk = 0, rst_n = 0;
  axil_req_t axi_req = '0;
  axil_rsp_t axi_rsp;
  logic tx, irq, rx_ext = 1, loop = 1;
  `include "tb_check.svh"
  `TB_VARS
  `include "axil_tasks.svh"
  always #5 clk = ~clk;
  `WATCHDOG(100000)
  uart #(.CLKS_PER_BIT(CPB), .FIFO_DEPTH(16)) dut (.clk, .rst_n, .s_axi_req(axi_req), .s_axi_rsp(axi_rsp),
                                                    .rx(loop ? tx : rx_ext), .tx, .irq);
  // measure the start-bit length
  int low_run = 0, start_len = -1;
  always @(posedge clk) begin
    if (!rst_n) low_run <= 0;
    else if (!tx) low_run <= low_run + 1;
    else begin if (low_run > 0 && start_len < 0) start_len <= low_run; low_run <= 0; end
  end
  initial begin
    logic [31:0] d;
    logic [1:0] r;
    automatic byte msg [6] = '{8'h01, 8'h72, 8'h65, 8'h67, 8'h00, 8'hFF};
    repeat (3) @(posedge clk);
    rst_n <= 1;
    axi_read(32'h4, d, r); `CHECK(d[3:0] == 4'b0100, "status after reset: tx empty")
    axi_write(32'h4, 32'h1, r);               // irq on rx available
    foreach (msg[i]) axi_write(32'h0, 32'(msg[i]), r);
    repeat (6 * 10 * CPB + 50) @(posedge clk);
    `CHECK(irq, "rx-available interrupt")
    axi_read(32'h4, d, r); `CHECK(d[0] && !d[1], "rx available, less than half")
    foreach (msg[i]) begin
      axi_read(32'h0, d, r);
      `CHECK(d[8] && d[7:0] == msg[i], $sformatf("loopback byte %0d: %h", i, d[7:0]))
    end
    axi_read(32'h0, d, r); `CHECK(!d[8], "rx FIFO empty")
    repeat (2) @(posedge clk);
    `CHECK(!irq, "irq drops when FIFO is empty")
    `CHECK(start_len == CPB, $sformatf("start bit %0d clocks", start_len))
    // external frame 0xA5 with 8N1
    loop <= 0;
    begin
      automatic logic [9:0] fr = {1'b1, 8'hA5, 1'b0};
      for (int b = 0; b < 10; b++) begin rx_ext <= fr[b]; repeat (CPB) @(posedge clk); end
    end
    repeat (5) @(posedge clk);
    axi_read(32'h0, d, r); `CHECK(d[8] && d[7:0] == 8'hA5, "external byte")
    `TB_DONE
  end
endmodule
