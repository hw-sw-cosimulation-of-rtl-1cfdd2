// Runs the CIFF modulator against a reference model of the second-order
// loop (delay-free first integrator, delaying second integrator,
// feed-forward of the input, saturation at +/-62500), using a crude
// quantiser in the loop, and with large errors that force saturation.
module tb_ciff_modulator;
  logic clk = 0, rst_n = 0, upd = 0;
  logic signed [15:0] vdes, vact;
  logic signed [18:0] vref;
  logic vld;
  `include "tb_check.svh"
  `TB_VARS
  always #5 clk = ~clk;
  `WATCHDOG(50000)
  ciff_modulator dut (.*);

  int a = 0, b = 0;       // model states: v2[n-1], v3[n-1]
  int nsat = 0;
  function automatic int sat(input int x);
    return x > 62500 ? 62500 : x < -62500 ? -62500 : x;
  endfunction

  initial begin
    vdes = 0; vact = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 400; n++) begin
      int d, q, v1, v2, v3, r;
      d = (n < 300) ? int'(20000.0 * $sin(n * 0.05)) : 31000;
      q = (n < 300) ? ((vref > 0) ? 20000 : -20000) : -32000;   // crude quantiser / forced error
      vdes <= 16'(d); vact <= 16'(q);
      upd <= 1; @(posedge clk); upd <= 0;
      v1 = d - q; v2 = sat(v1 + a); v3 = sat(a + b); r = v2 + v3 + d;
      if (v1 + a != v2 || a + b != v3) nsat++;
      a = v2; b = v3;
      #1;
      `CHECK(vld, "vld one cycle after upd")
      `CHECK(vref == 19'(r), $sformatf("n=%0d vref %0d vs %0d", n, vref, r))
      @(posedge clk);
    end
    `CHECK(nsat > 0, "saturation exercised")
    `TB_DONE
  end
endmodule
