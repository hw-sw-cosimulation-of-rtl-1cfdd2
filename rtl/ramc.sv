// ramc: RAM controller, the CPU's AXI4-Lite window onto port A of the DPRAM.
//
// Word address = AXI address bits [AW+1:2]; reads take one extra cycle for
// the synchronous RAM. Writes are passed through as well (byte strobes are
// ignored: whole words are written). The role follows the document; write
// access is this design's choice.
module ramc
  import mc_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  axil_req_t      s_axi_req,
  output axil_rsp_t      s_axi_rsp,
  output logic           a_en,
  output logic           a_we,
  output logic [AW-1:0]  a_addr,
  output logic [31:0]    a_wdata,
  input  logic [31:0]    a_rdata
);
  logic wr, rd;
  logic [31:0] waddr, raddr, wdata;
  logic [3:0] wstrb;

  axil_slave_port #(.RD_LAT(1)) u_port (
    .clk, .rst_n, .req(s_axi_req), .rsp(s_axi_rsp),
    .wr, .waddr, .wdata, .wstrb, .rd, .raddr, .rdata(a_rdata)
  );

  assign a_en    = wr || rd;
  assign a_we    = wr && (wstrb != 4'b0);
  assign a_addr  = wr ? waddr[AW+1:2] : raddr[AW+1:2];
  assign a_wdata = wdata;
endmodule
