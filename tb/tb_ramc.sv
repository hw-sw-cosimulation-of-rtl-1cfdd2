// RAM controller with a DPRAM behind it: words stored through port B are
// read back over AXI; words written over AXI are read back too.
module tb_ramc;
  import mc_pkg::*;
  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0;
  axil_req_t axi_req = '0;
  axil_rsp_t axi_rsp;
  logic a_en, a_we, b_we = 0;
  logic [5:0] a_addr, b_addr;
  logic [31:0] a_wdata, a_rdata, b_wdata;
  `include "tb_check.svh"
  `TB_VARS
  `include "axil_tasks.svh"
  always #5 clk = ~clk;
  `WATCHDOG(20000)
  ramc #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .s_axi_req(axi_req), .s_axi_rsp(axi_rsp),
                             .a_en, .a_we, .a_addr, .a_wdata, .a_rdata);
  dpram #(.DEPTH(DEPTH)) u_ram (.*);
  initial begin
    logic [31:0] m [DEPTH], d;
    logic [1:0] r;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < DEPTH; i++) begin
      m[i] = $urandom; b_we <= 1; b_addr <= 6'(i); b_wdata <= m[i]; @(posedge clk);
    end
    b_we <= 0;
    for (int i = 0; i < DEPTH; i += 3) begin
      axi_read(32'h0001_0000 + 32'(4*i), d, r);
      `CHECK(d == m[i] && r == RESP_OKAY, $sformatf("read word %0d", i))
    end
    for (int i = 0; i < 10; i++) begin
      automatic int w = $urandom_range(0, DEPTH - 1);
      m[w] = $urandom;
      axi_write(32'(4*w), m[w], r);
      `CHECK(r == RESP_OKAY, "write OKAY")
      axi_read(32'(4*w), d, r);
      `CHECK(d == m[w], "write then read")
    end
    `TB_DONE
  end
endmodule
