// Reference-scenario test: fast input sources, a 1 kHz synthesised reference
// and an on-line frequency change by a factor of 0.5, at default parameters.
//
// The three input voltages are 5 kHz sinusoids of 28000 counts, turned into
// 20 Mbps first-order sigma-delta bitstreams; the load currents come from an
// RL load fed by the phases the converter selects. The CPU model sets the
// synthesiser to 1 kHz, lets it run, then halves the frequency register.
// Checked: the decimated input words have the source's period (20 samples)
// and amplitude; the reference period is 100 samples before and 200 after the
// change; on every sample k_sel is the index of the smallest cost and the
// three output phases' applied voltages are the selected inputs' words; the
// gates never short two inputs or leave an output open.
module tb_mc_cosim;
  import mc_pkg::*;
  localparam real FS = 31250.0;
  localparam real VIN = 28000.0, FIN = 5000.0;
  localparam logic [31:0] CIF = 32'h0000_2000;

  logic clk = 0, rst_n = 0;
  axil_req_t axi_req = '0;
  axil_rsp_t axi_rsp;
  logic [5:0] adc_bs = '0;
  logic irq_cpu, uart_rx = 1'b1, uart_tx;
  logic [17:0] gate;
  kidx_t k_sel;

  `include "tb_check.svh"
  `TB_VARS
  `include "axil_tasks.svh"
  always #5 clk = ~clk;
  `WATCHDOG(900000)

  mc_top dut (.clk, .rst_n, .adc_bs, .s_axi_req(axi_req), .s_axi_rsp(axi_rsp), .irq_cpu,
              .uart_rx, .uart_tx, .gate, .k_sel);

  // source, RL load and first-order sigma-delta ADCs (one step per 20 MHz bit)
  real vs [3], io [3], integ [6];
  longint cyc = 0;
  initial begin
    for (int i = 0; i < 3; i++) begin vs[i] = 0.0; io[i] = 0.0; end
    for (int c = 0; c < 6; c++) integ[c] = 0.0;
  end
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) if (rst_n && dut.ce20) begin
    automatic real t = real'(cyc) * 10e-9;
    automatic real vo [3], vm, x [6];
    automatic conf_t c = conf_of(k_sel);
    for (int i = 0; i < 3; i++) vs[i] = VIN * $sin(2.0 * 3.14159265358979 * FIN * t - real'(i) * 2.0943951023932);
    for (int j = 0; j < 3; j++) vo[j] = vs[phase_num(out_phase(c, j))];
    vm = (vo[0] + vo[1] + vo[2]) / 3.0;
    for (int j = 0; j < 3; j++) begin
      io[j] = io[j] + 0.8e-4 * (vo[j] - vm) - 1e-4 * io[j];
      if (io[j] > 30000.0) io[j] = 30000.0;
      if (io[j] < -30000.0) io[j] = -30000.0;
    end
    for (int k = 0; k < 3; k++) begin x[k] = vs[k]; x[k+3] = io[k]; end
    for (int k = 0; k < 6; k++) begin
      integ[k] = integ[k] + x[k] - (adc_bs[5-k] ? FS : -FS);
      adc_bs[5-k] <= (integ[k] >= 0.0);
    end
  end

  // decisions, feedback and switch safety
  int n_argmin = 0, n_kchg = 0, n_fb = 0, n_comm = 0, n_bad_gate = 0, n_err = 0;
  function automatic logic gate_ok(input logic [5:0] g);
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++)
      if (i != j && g[2*i] && g[2*j+1]) return 1'b0;
    return |g;
  endfunction
  always @(negedge clk) if (rst_n) begin
    if (dut.min_vld) begin
      automatic int best = 0;
      for (int i = 1; i < 27; i++) if (dut.all_cost[i] < dut.all_cost[best]) best = i;
      n_argmin++;
      if (dut.k_min != kidx_t'(best + 1)) n_err++;
      if (dut.k_min != k_sel) n_kchg++;
    end
    if (dut.log_load) begin
      automatic logic ok = 1'b1;
      for (int j = 0; j < 3; j++)
        if (dut.vact[j] != dut.adc_w[95 - 16*int'(phase_num(out_phase(conf_of(k_sel), j))) -: 16]) ok = 1'b0;
      if (ok) n_fb++; else n_err++;
    end
    for (int j = 0; j < 3; j++) if (!gate_ok(gate[6*j +: 6])) n_bad_gate++;
    n_comm += int'(dut.g_od[0].comm_done) + int'(dut.g_od[1].comm_done) + int'(dut.g_od[2].comm_done);
  end

  // periods in samples: reference 1 (rising zero crossings) and input word V1
  // (crossings with +-4000 counts of hysteresis), and the peak of V1
  int smp = 0, last_r = -1, per_ref = 0, last_v = -1, per_v = 0, vpk = 0;
  logic signed [15:0] ref_prev = '0;
  logic v_low = 1'b0;
  always @(negedge clk) if (rst_n && dut.dac_vld) begin
    automatic logic signed [15:0] r = $signed(dut.dac_w[47:32]);
    automatic logic signed [15:0] v = $signed(dut.adc_w[95:80]);
    smp++;
    if (ref_prev < 0 && r >= 0) begin
      if (last_r >= 0) per_ref = smp - last_r;
      last_r = smp;
    end
    ref_prev = r;
    if (v < -16'sd4000) v_low = 1'b1;
    if (v_low && v > 16'sd4000) begin
      v_low = 1'b0;
      if (last_v >= 0) per_v = smp - last_v;
      last_v = smp;
    end
    if (smp > 50 && int'(v) > vpk) vpk = int'(v);
  end

  task automatic wait_samples(input int n);
    int s0 = smp;
    while (smp < s0 + n) @(posedge clk);
  endtask

  initial begin
    logic [31:0] d;
    logic [1:0] r;
    int per1;
    repeat (20) @(posedge clk);
    rst_n <= 1;
    axi_write(CIF + 32'h04, 32'd42949673, r);     // 1 kHz
    axi_write(CIF + 32'h08, 32'h6000, r);         // amplitude 0.75
    axi_write(CIF + 32'h0C, 32'h0, r);
    axi_write(CIF + 32'h10, 32'h3A80_0000, r);    // 1/Qdes = 2^-10
    wait_samples(260);
    per1 = per_ref;
    `CHECK(per1 == 100, $sformatf("1 kHz reference: period %0d samples", per1))
    `CHECK(per_v == 20, $sformatf("5 kHz input word: period %0d samples", per_v))
    `CHECK(vpk > 26000 && vpk < 29500, $sformatf("input word peak %0d counts", vpk))
    axi_read(CIF + 32'h04, d, r);
    axi_write(CIF + 32'h04, d >> 1, r);           // halve the frequency on line
    wait_samples(450);
    `CHECK(per_ref == 200, $sformatf("500 Hz reference: period %0d samples", per_ref))
    `CHECK(per_v == 20, "input word period unchanged")
    $display("decisions %0d, k changes %0d, commutations %0d", n_argmin, n_kchg, n_comm);
    `CHECK(n_err == 0, $sformatf("%0d decision/feedback errors", n_err))
    `CHECK(n_bad_gate == 0, $sformatf("%0d unsafe gate patterns", n_bad_gate))
    `CHECK(n_argmin >= 700, "a decision every sample")
    `CHECK(n_fb >= n_argmin - 1, "modulator feedback every sample")
    `CHECK(n_kchg > 0 && n_comm > 0, "configuration changes and commutations")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
