// axil_slave_port: turns an AXI4-Lite slave port into a simple register bus.
//
// Write: when AWVALID and WVALID are both high and no response is pending,
// AWREADY and WREADY are raised for that cycle, `wr` pulses with the address
// and data, and BVALID (OKAY) is raised the next cycle until BREADY.
// Read: when ARVALID is high and no read is in flight, ARREADY is raised,
// `rd` pulses with `raddr`; `rdata` from the register block is sampled
// RD_LAT cycles later (0: same cycle, 1: next cycle, for synchronous RAM)
// and returned with RVALID (OKAY) until RREADY. One transaction per direction
// at a time.
module axil_slave_port
  import mc_pkg::*;
#(
  parameter int unsigned RD_LAT = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  axil_req_t    req,
  output axil_rsp_t    rsp,
  output logic         wr,
  output logic [31:0]  waddr,
  output logic [31:0]  wdata,
  output logic [3:0]   wstrb,
  output logic         rd,
  output logic [31:0]  raddr,
  input  logic [31:0]  rdata
);
  logic bvalid, rvalid, rpend;
  logic [31:0] rdata_q;

  assign wr    = req.awvalid && req.wvalid && !bvalid;
  assign waddr = req.awaddr;
  assign wdata = req.wdata;
  assign wstrb = req.wstrb;
  assign rd    = req.arvalid && !rvalid && !rpend;
  assign raddr = req.araddr;

  always_comb begin
    rsp = '0;
    rsp.awready = wr;
    rsp.wready  = wr;
    rsp.bvalid  = bvalid;
    rsp.bresp   = RESP_OKAY;
    rsp.arready = rd;
    rsp.rvalid  = rvalid;
    rsp.rdata   = rdata_q;
    rsp.rresp   = RESP_OKAY;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bvalid <= 1'b0; rvalid <= 1'b0; rpend <= 1'b0; rdata_q <= '0;
    end else begin
      if (wr) bvalid <= 1'b1;
      else if (bvalid && req.bready) bvalid <= 1'b0;
      if (RD_LAT == 0 && rd) begin
        rvalid <= 1'b1; rdata_q <= rdata;
      end else if (RD_LAT != 0 && rd) begin
        rpend <= 1'b1;
      end else if (rpend) begin
        rpend <= 1'b0; rvalid <= 1'b1; rdata_q <= rdata;
      end else if (rvalid && req.rready) begin
        rvalid <= 1'b0;
      end
    end
  end

  // a response stays valid until it is taken
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                  bvalid && !req.bready |=> bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                  rvalid && !req.rready |=> rvalid && $stable(rdata_q));
endmodule
