// intc: interrupt controller between the interrupt sources and the CPU.
//
// Registers (AXI4-Lite, offsets within the block):
//   0x0 ISR  read: pending requests, bit i for source i (0 UART, 1 CPUiface)
//   0x8 IER  read/write: enable mask
//   0xC IAR  write 1 to acknowledge (clear) a pending request
// A source that is high sets its ISR bit; acknowledging clears it, and it
// is set again if the source is still high. `irq` = OR of enabled pending
// bits. The role follows the document; the register map is this design's.
module intc
  import mc_pkg::*;
#(
  parameter int unsigned NSRC = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  axil_req_t        s_axi_req,
  output axil_rsp_t        s_axi_rsp,
  input  logic [NSRC-1:0]  src,
  output logic             irq
);
  logic wr, rd;
  logic [31:0] waddr, raddr, wdata, rdata;
  logic [3:0] wstrb;
  logic [NSRC-1:0] isr, ier;

  axil_slave_port #(.RD_LAT(0)) u_port (
    .clk, .rst_n, .req(s_axi_req), .rsp(s_axi_rsp),
    .wr, .waddr, .wdata, .wstrb, .rd, .raddr, .rdata
  );

  always_comb begin
    case (raddr[3:2])
      2'd0:    rdata = 32'(isr);
      2'd2:    rdata = 32'(ier);
      default: rdata = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      isr <= '0; ier <= '0; irq <= 1'b0;
    end else begin
      isr <= (isr | src) & ~((wr && waddr[3:2] == 2'd3) ? wdata[NSRC-1:0] : '0);
      if (wr && waddr[3:2] == 2'd2) ier <= wdata[NSRC-1:0];
      irq <= |(isr & ier);
    end
  end
endmodule
