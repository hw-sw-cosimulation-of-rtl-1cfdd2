// Writes through both ports and reads through port A, checking the
// one-cycle read latency and port B priority on a collision.
module tb_dpram;
  localparam int DEPTH = 64;
  logic clk = 0, a_en = 0, a_we = 0, b_we = 0;
  logic [5:0] a_addr, b_addr;
  logic [31:0] a_wdata, a_rdata, b_wdata;
  `include "tb_check.svh"
  `TB_VARS
  always #5 clk = ~clk;
  `WATCHDOG(5000)
  dpram #(.DEPTH(DEPTH)) dut (.*);
  logic [31:0] m [DEPTH];
  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      m[i] = $urandom;
      if (i % 2) begin b_we <= 1; b_addr <= 6'(i); b_wdata <= m[i]; a_en <= 0; end
      else begin a_en <= 1; a_we <= 1; a_addr <= 6'(i); a_wdata <= m[i]; b_we <= 0; end
      @(posedge clk);
    end
    b_we <= 0; a_we <= 0;
    a_en <= 1; a_we <= 1; a_addr <= 6'd5; a_wdata <= 32'h1111; b_we <= 1; b_addr <= 6'd5; b_wdata <= 32'h2222;
    @(posedge clk); b_we <= 0; a_we <= 0; m[5] = 32'h2222;
    for (int i = 0; i < DEPTH; i++) begin
      a_en <= 1; a_addr <= 6'(i);
      @(posedge clk); #1;
      `CHECK(a_rdata == m[i], $sformatf("word %0d", i))
    end
    `TB_DONE
  end
endmodule
