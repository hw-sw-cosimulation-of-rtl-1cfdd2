// AXI4-Lite master tasks for testbenches. Include inside a module that
// declares `clk`, `axi_req` (mc_pkg::axil_req_t) and `axi_rsp`
// (mc_pkg::axil_rsp_t). Each task runs one complete transaction. Requests
// change one time unit after a rising edge; ready/valid are looked at in the
// same place, so a handshake seen there completes on the next rising edge.
task automatic axi_write(input logic [31:0] addr, input logic [31:0] data, output logic [1:0] resp);
  @(posedge clk); #1;
  axi_req.awvalid = 1'b1; axi_req.awaddr = addr;
  axi_req.wvalid  = 1'b1; axi_req.wdata  = data; axi_req.wstrb = 4'hF;
  axi_req.bready  = 1'b1;
  #1;
  while (!(axi_rsp.awready && axi_rsp.wready)) begin @(posedge clk); #2; end
  @(posedge clk); #1;
  axi_req.awvalid = 1'b0; axi_req.wvalid = 1'b0;
  #1;
  while (!axi_rsp.bvalid) begin @(posedge clk); #2; end
  resp = axi_rsp.bresp;
  @(posedge clk); #1;
  axi_req.bready = 1'b0;
endtask

task automatic axi_read(input logic [31:0] addr, output logic [31:0] data, output logic [1:0] resp);
  @(posedge clk); #1;
  axi_req.arvalid = 1'b1; axi_req.araddr = addr; axi_req.rready = 1'b1;
  #1;
  while (!axi_rsp.arready) begin @(posedge clk); #2; end
  @(posedge clk); #1;
  axi_req.arvalid = 1'b0;
  #1;
  while (!axi_rsp.rvalid) begin @(posedge clk); #2; end
  data = axi_rsp.rdata; resp = axi_rsp.rresp;
  @(posedge clk); #1;
  axi_req.rready = 1'b0;
endtask
