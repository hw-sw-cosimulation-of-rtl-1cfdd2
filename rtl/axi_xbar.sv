// axi_xbar: AXI4-Lite crossbar from the single CPU master to the four
// slaves of the controller, decoded on the address offset:
//   0x0_0000 - 0x0_0FFF  UART      (slave 0)
//   0x0_1000 - 0x0_1FFF  INTC      (slave 1)
//   0x0_2000 - 0x0_2FFF  CPUiface  (slave 2)
//   0x1_0000 - 0x1_FFFF  RAMC      (slave 3)
// Address bits above 19 (the fixed base of the I/O region) are ignored.
// Each direction handles one transaction at a time: when AWVALID (ARVALID)
// appears the target is decoded and latched, the next cycles connect the
// master to that slave until the response handshake completes. An unmapped
// address is accepted by the crossbar itself and answered with DECERR.
// The address map follows the document; the single-outstanding scheme is
// this design's choice.
module axi_xbar
  import mc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  axil_req_t        m_req,
  output axil_rsp_t        m_rsp,
  output axil_req_t [3:0]  s_req,
  input  axil_rsp_t [3:0]  s_rsp
);
  localparam logic [2:0] NONE = 3'd4;

  function automatic logic [2:0] decode(input logic [31:0] a);
    if (a[19:16] == 4'h1)      return 3'd3;
    else if (a[19:12] == 8'h00) return 3'd0;
    else if (a[19:12] == 8'h01) return 3'd1;
    else if (a[19:12] == 8'h02) return 3'd2;
    else                        return NONE;
  endfunction

  typedef enum logic [1:0] {IDLE, FWD, ERR_ACC, ERR_RSP} st_t;

  st_t wst, rst;
  logic [2:0] wsel, rsel;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wst <= IDLE; rst <= IDLE; wsel <= '0; rsel <= '0;
    end else begin
      case (wst)
        IDLE: if (m_req.awvalid) begin
          wsel <= decode(m_req.awaddr);
          wst  <= (decode(m_req.awaddr) == NONE) ? ERR_ACC : FWD;
        end
        FWD:     if (s_rsp[wsel[1:0]].bvalid && m_req.bready) wst <= IDLE;
        ERR_ACC: if (m_req.awvalid && m_req.wvalid) wst <= ERR_RSP;
        ERR_RSP: if (m_req.bready) wst <= IDLE;
        default: wst <= IDLE;
      endcase
      case (rst)
        IDLE: if (m_req.arvalid) begin
          rsel <= decode(m_req.araddr);
          rst  <= (decode(m_req.araddr) == NONE) ? ERR_ACC : FWD;
        end
        FWD:     if (s_rsp[rsel[1:0]].rvalid && m_req.rready) rst <= IDLE;
        ERR_ACC: rst <= ERR_RSP;
        ERR_RSP: if (m_req.rready) rst <= IDLE;
        default: rst <= IDLE;
      endcase
    end
  end

  always_comb begin
    m_rsp = '0;
    for (int i = 0; i < 4; i++) begin
      s_req[i] = '0;
      if (wst == FWD && wsel == 3'(i)) begin
        s_req[i].awvalid = m_req.awvalid;
        s_req[i].awaddr  = m_req.awaddr;
        s_req[i].wvalid  = m_req.wvalid;
        s_req[i].wdata   = m_req.wdata;
        s_req[i].wstrb   = m_req.wstrb;
        s_req[i].bready  = m_req.bready;
      end
      if (rst == FWD && rsel == 3'(i)) begin
        s_req[i].arvalid = m_req.arvalid;
        s_req[i].araddr  = m_req.araddr;
        s_req[i].rready  = m_req.rready;
      end
    end
    if (wst == FWD) begin
      m_rsp.awready = s_rsp[wsel[1:0]].awready;
      m_rsp.wready  = s_rsp[wsel[1:0]].wready;
      m_rsp.bvalid  = s_rsp[wsel[1:0]].bvalid;
      m_rsp.bresp   = s_rsp[wsel[1:0]].bresp;
    end else if (wst == ERR_ACC) begin
      m_rsp.awready = m_req.awvalid && m_req.wvalid;
      m_rsp.wready  = m_req.awvalid && m_req.wvalid;
    end else if (wst == ERR_RSP) begin
      m_rsp.bvalid = 1'b1;
      m_rsp.bresp  = RESP_DECERR;
    end
    if (rst == FWD) begin
      m_rsp.arready = s_rsp[rsel[1:0]].arready;
      m_rsp.rvalid  = s_rsp[rsel[1:0]].rvalid;
      m_rsp.rdata   = s_rsp[rsel[1:0]].rdata;
      m_rsp.rresp   = s_rsp[rsel[1:0]].rresp;
    end else if (rst == ERR_ACC) begin
      m_rsp.arready = 1'b1;
    end else if (rst == ERR_RSP) begin
      m_rsp.rvalid = 1'b1;
      m_rsp.rresp  = RESP_DECERR;
      m_rsp.rdata  = '0;
    end
  end
endmodule
