// Checks the configuration table of mc_pkg against an independent list of
// the 27 switch states (output A, B, C connected to input a, b or c).
module tb_mc_pkg;
  import mc_pkg::*;
  logic clk = 0;
  `include "tb_check.svh"
  `TB_VARS
  string tbl [27] = '{"abb","baa","bcc","cbb","caa","acc","bab","aba","cbc","bcb","aca","cac",
                      "bba","aab","ccb","bbc","aac","cca","aaa","bbb","ccc","abc","acb","bac",
                      "bca","cab","cba"};
  function automatic phase_t code(input byte ch);
    return (ch == "a") ? 2'b01 : (ch == "b") ? 2'b10 : 2'b11;
  endfunction
  initial begin
    conf_t c;
    automatic bit [63:0] seen = '0;
    for (int k = 1; k <= 27; k++) begin
      c = conf_of(kidx_t'(k));
      `CHECK(c == {code(tbl[k-1][0]), code(tbl[k-1][1]), code(tbl[k-1][2])}, $sformatf("conf_of(%0d)", k))
      for (int j = 0; j < 3; j++) begin
        `CHECK(out_phase(c, j) == code(tbl[k-1][j]), "out_phase")
        `CHECK(phase_num(out_phase(c, j)) == 2'(tbl[k-1][j] - "a"), "phase_num")
      end
      `CHECK(!seen[c], "duplicate configuration")
      seen[c] = 1'b1;
    end
    `CHECK(conf_of(5'd4) == 6'b111010, "k=4 is 111010")
    `CHECK(conf_of(5'd0) == 6'b0, "k=0 unused")
    `TB_DONE
  end
endmodule
