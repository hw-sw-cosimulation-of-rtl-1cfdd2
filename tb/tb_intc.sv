// Interrupt controller: pending bits latch, enable mask gates the CPU line,
// acknowledge clears.
module tb_intc;
  import mc_pkg::*;
  logic clk = 0, rst_n = 0;
  axil_req_t axi_req = '0;
  axil_rsp_t axi_rsp;
  logic [1:0] src = '0;
  logic irq;
  `include "tb_check.svh"
  `TB_VARS
  `include "axil_tasks.svh"
  always #5 clk = ~clk;
  `WATCHDOG(20000)
  intc dut (.clk, .rst_n, .s_axi_req(axi_req), .s_axi_rsp(axi_rsp), .src, .irq);
  initial begin
    logic [31:0] d;
    logic [1:0] r;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    src <= 2'b10; @(posedge clk); src <= 2'b00;
    repeat (3) @(posedge clk);
    axi_read(32'h0, d, r); `CHECK(d == 32'h2, "source 1 pending")
    `CHECK(!irq, "masked")
    axi_write(32'h8, 32'h1, r);
    repeat (2) @(posedge clk); `CHECK(!irq, "source 1 still masked")
    axi_write(32'h8, 32'h3, r);
    repeat (2) @(posedge clk); `CHECK(irq, "irq raised")
    axi_read(32'h8, d, r); `CHECK(d == 32'h3, "IER readback")
    axi_write(32'hC, 32'h2, r);
    repeat (2) @(posedge clk); `CHECK(!irq, "acknowledged")
    axi_read(32'h0, d, r); `CHECK(d == 32'h0, "nothing pending")
    src <= 2'b01; repeat (3) @(posedge clk);
    `CHECK(irq, "level source raises irq")
    axi_write(32'hC, 32'h1, r);
    repeat (2) @(posedge clk); `CHECK(irq, "source still high: pending again")
    src <= 2'b00; axi_write(32'hC, 32'h1, r);
    repeat (2) @(posedge clk); `CHECK(!irq, "cleared after source drops")
    `TB_DONE
  end
endmodule
