// Checks the operands the mux forms for each of the nine configurations of
// lane 1 (k = 10..18) against a table written out independently, the slot
// spacing of MUX_DIV cycles and the end-of-sweep pulse.
module tb_config_mux;
  import mc_pkg::*;
  localparam int MUX_DIV = 50;
  logic clk = 0, rst_n = 0, start = 0;
  logic [95:0] adc;
  logic en, busy, sweep_done;
  logic [3:0] slot;
  kidx_t k;
  logic signed [2:0][16:0] dv;
  logic signed [2:0][17:0] ik;
  logic signed [2:0][15:0] vk;
  `include "tb_check.svh"
  `TB_VARS
  always #5 clk = ~clk;
  `WATCHDOG(20000)
  config_mux #(.LANE(1), .MUX_DIV(MUX_DIV)) dut (.*);

  string tbl [27] = '{"abb","baa","bcc","cbb","caa","acc","bab","aba","cbc","bcb","aca","cac",
                      "bba","aab","ccb","bbc","aac","cca","aaa","bbb","ccc","abc","acb","bac",
                      "bca","cab","cba"};
  int v [3], i [3];

  initial begin
    int t, last_en, nslot;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int rep = 0; rep < 3; rep++) begin
      for (int c = 0; c < 3; c++) begin v[c] = $urandom_range(0, 60000) - 30000; i[c] = $urandom_range(0, 60000) - 30000; end
      adc <= {16'(v[0]), 16'(v[1]), 16'(v[2]), 16'(i[0]), 16'(i[1]), 16'(i[2])};
      @(posedge clk);
      start <= 1; @(posedge clk); start <= 0;
      t = 0; last_en = -1; nslot = 0;
      while (!sweep_done && t < 1000) begin
        @(posedge clk); #1; t++;
        if (en) begin
          automatic int kk = 10 + nslot, e_i [3];
          if (last_en >= 0) `CHECK(t - last_en == MUX_DIV, "slot spacing")
          last_en = t;
          `CHECK(k == 5'(kk) && slot == 4'(nslot), "k and slot")
          e_i = '{0, 0, 0};
          for (int j = 0; j < 3; j++) begin
            automatic int p = tbl[kk-1][j] - "a";
            `CHECK($signed(vk[j]) == v[p], $sformatf("k=%0d vk[%0d]", kk, j))
            e_i[p] += i[j];
          end
          for (int p = 0; p < 3; p++) `CHECK($signed(ik[p]) == e_i[p], $sformatf("k=%0d ik[%0d]", kk, p))
          `CHECK($signed(dv[0]) == v[1] - v[2] && $signed(dv[1]) == v[2] - v[0] && $signed(dv[2]) == v[0] - v[1], "dv")
          nslot++;
        end
      end
      `CHECK(nslot == 9, "nine slots per sweep")
      `CHECK(t == 9 * MUX_DIV, $sformatf("sweep_done after %0d cycles", t))
    end
    `TB_DONE
  end
endmodule
