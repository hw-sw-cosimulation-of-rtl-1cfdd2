// Scores random configurations through the whole cost chain and compares
// with a real-valued model:
//   cost = |q_ref - (sum dv*ik >> 19)| / Q_des + sum ((v_ref - vk) >> 2)^2 / (V_des + V_s)
// within float truncation error. Checks that the result comes in fewer than
// 50 cycles (one 2 MHz mux slot) and that slot and q_act travel with it.
module tb_dsp_datapath;
  import mc_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  logic [3:0] slot, slot_o;
  logic signed [2:0][16:0] dv;
  logic signed [2:0][17:0] ik;
  logic signed [2:0][15:0] vk;
  logic signed [18:0] q_ref;
  logic signed [2:0][18:0] v_ref;
  f32_t inv_qdes, inv_vdes, cost;
  logic signed [15:0] q_act;
  logic done;
  `include "tb_check.svh"
  `TB_VARS
  always #5 clk = ~clk;
  `WATCHDOG(50000)
  dsp_datapath dut (.*);

  function automatic real f2r(input logic [31:0] f);
    if (f[30:23] == 0) return 0.0;
    return (f[31] ? -1.0 : 1.0) * (1.0 + real'(f[22:0]) / 8388608.0) * pow2(int'(f[30:23]) - 127);
  endfunction

  initial begin
    automatic int maxlat = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 200; n++) begin
      automatic longint q = 0, ev = 0;
      automatic int qa, lat = 0, qr, vr [3], vv [3];
      real r, g;
      automatic logic [31:0] iq = {1'b0, 8'($urandom_range(110, 135)), 23'($urandom)};
      automatic logic [31:0] iv = {1'b0, 8'($urandom_range(100, 125)), 23'($urandom)};
      for (int j = 0; j < 3; j++) begin
        automatic int a = $urandom_range(0, 120000) - 60000, b = $urandom_range(0, 120000) - 60000;
        dv[j] = 17'(a); ik[j] = 18'(b); q += longint'(a) * b;
        vr[j] = $urandom_range(0, 300000) - 150000; vv[j] = $urandom_range(0, 62000) - 31000;
        v_ref[j] = 19'(vr[j]); vk[j] = 16'(vv[j]);
        ev += longint'((vr[j] - vv[j]) >>> 2) * ((vr[j] - vv[j]) >>> 2);
      end
      qa = int'(q >>> 19);
      qr = $urandom_range(0, 300000) - 150000;
      q_ref = 19'(qr); inv_qdes = iq; inv_vdes = iv; slot = 4'(n % 9);
      en <= 1; @(posedge clk); en <= 0;
      #1; lat = 1; while (!done && lat < 100) begin @(posedge clk); #1; lat++; end
      if (lat > maxlat) maxlat = lat;
      `CHECK(lat < 50, $sformatf("latency %0d fits a 50-cycle slot", lat))
      r = $itor(qr > qa ? qr - qa : qa - qr) * f2r(iq) + $itor(ev) * f2r(iv);
      g = f2r(cost);
      `CHECK(r == 0.0 ? g == 0.0 : ((r - g) / r < 1e-6 && (g - r) / r < 1e-6), $sformatf("cost %g vs %g", g, r))
      `CHECK(slot_o == 4'(n % 9), "slot travels with the result")
      `CHECK(q_act == 16'(qa), "q_act")
    end
    $display("datapath latency %0d cycles", maxlat);
    `TB_DONE
  end
endmodule
