// Crossbar with four register slaves that answer with their own number:
// each mapped region reaches the right slave for writes and reads, an
// unmapped address gets DECERR.
module tb_axi_xbar;
  import mc_pkg::*;
  logic clk = 0, rst_n = 0;
  axil_req_t axi_req = '0;
  axil_rsp_t axi_rsp;
  axil_req_t [3:0] s_req;
  axil_rsp_t [3:0] s_rsp;
  `include "tb_check.svh"
  `TB_VARS
  `include "axil_tasks.svh"
  always #5 clk = ~clk;
  `WATCHDOG(20000)
  axi_xbar dut (.clk, .rst_n, .m_req(axi_req), .m_rsp(axi_rsp), .s_req, .s_rsp);

  logic [31:0] last_w [4];
  for (genvar i = 0; i < 4; i++) begin : g_s
    logic wr, rd;
    logic [31:0] waddr, wdata, raddr;
    logic [3:0] wstrb;
    axil_slave_port #(.RD_LAT(i % 2)) u_s (.clk, .rst_n, .req(s_req[i]), .rsp(s_rsp[i]),
      .wr, .waddr, .wdata, .wstrb, .rd, .raddr, .rdata({4'(i), last_w[i][27:0]}));
    always @(posedge clk) if (wr) last_w[i] <= wdata;
  end

  initial begin
    automatic logic [31:0] base [4] = '{32'hE000_0000, 32'hE000_1000, 32'hE000_2000, 32'hE001_0000};
    logic [31:0] d;
    logic [1:0] r;
    for (int i = 0; i < 4; i++) last_w[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 20; n++) begin
      automatic int s = n % 4;
      automatic logic [31:0] v = $urandom & 32'h0FFF_FFFF;
      axi_write(base[s] + 32'(4 * (n % 8)), v, r);
      `CHECK(r == RESP_OKAY && last_w[s] == v, $sformatf("write reaches slave %0d", s))
      axi_read(base[s] + 32'h4, d, r);
      `CHECK(r == RESP_OKAY && d == {4'(s), v[27:0]}, $sformatf("read from slave %0d", s))
    end
    axi_write(32'hE000_5000, 32'h1, r); `CHECK(r == RESP_DECERR, "unmapped write")
    axi_read(32'hE000_3000, d, r);      `CHECK(r == RESP_DECERR, "unmapped read")
    axi_read(32'hE000_2000, d, r);      `CHECK(r == RESP_OKAY && d[31:28] == 4'd2, "recovers after DECERR")
    `TB_DONE
  end
endmodule
