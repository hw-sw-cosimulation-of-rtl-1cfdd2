// End-to-end test of the controller at its default parameters.
//
// The testbench closes the loop: a three-phase source (28000 counts, 500 Hz)
// and an RL load fed by the output phases the converter selects are sampled
// by first-order sigma-delta modulators whose bitstreams drive the ADC pins.
// A CPU model configures the design over AXI4-Lite and services interrupts.
// Sequence: UART receive and transmit, an unmapped access, continuous
// logging in format 1 then format 2 until the buffer has filled, a
// frequency change, and a snapshot with a reactive-power demand that cannot
// be met (the modulators saturate).
// Checked on every sample: k_sel is the index of the smallest of the 27
// costs; the modulators' quantised values follow k_sel; each log record
// holds the right fields and lands in memory word by word; no two inputs
// are ever shorted and no output is left open. Each mechanism is counted
// and the test fails if one never happened.
module tb_mc_top;
  import mc_pkg::*;
  localparam int CPB = 10;                  // UART bit time of the top's default
  localparam real FS = 31250.0;             // ADC full scale in counts
  localparam real VIN = 28000.0, FIN = 500.0;
  localparam logic [31:0] UART = 32'h0000_0000, INTC = 32'h0000_1000,
                          CIF = 32'h0000_2000, RAM = 32'h0001_0000;

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
  `WATCHDOG(1500000)

  mc_top dut (.clk, .rst_n, .adc_bs, .s_axi_req(axi_req), .s_axi_rsp(axi_rsp), .irq_cpu,
              .uart_rx, .uart_tx, .gate, .k_sel);

  // ---------------- plant and sigma-delta ADC models ----------------
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
    for (int j = 0; j < 3; j++) begin   // RL load, time constant 10000 bit periods
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

  // ---------------- counters of the mechanisms ----------------
  int n_argmin = 0, n_kchg = 0, n_fb = 0, n_comm = 0, n_bad_gate = 0, n_sat = 0;
  int n_fmt1 = 0, n_fmt2 = 0, n_words = 0, n_half = 0, n_full = 0, n_snap = 0;
  int n_decerr = 0, n_urx = 0, n_utx = 0, n_irq = 0, n_freq = 0, n_ramrd = 0;
  int n_err = 0;                      // record or decision errors (reported per event)
  logic [31:0] shadow [1024];
  initial for (int i = 0; i < 1024; i++) shadow[i] = '0;

  // decision, feedback and record checks
  always @(negedge clk) if (rst_n) begin
    if (dut.min_vld) begin
      automatic int best = 0;
      for (int i = 1; i < 27; i++) if (dut.all_cost[i] < dut.all_cost[best]) best = i;
      n_argmin++;
      if (dut.k_min != kidx_t'(best + 1)) begin
        n_err++; $display("FAIL: k_min %0d, smallest cost at %0d @%0t", dut.k_min, best + 1, $time);
      end
      if (dut.k_min != k_sel) n_kchg++;
    end
    if (dut.log_load) begin                  // one cycle after the decision
      automatic logic ok = (dut.qact_sel == dut.all_q[k_sel - 5'd1]);
      for (int j = 0; j < 3; j++)
        if (dut.vact[j] != dut.adc_w[95 - 16*int'(phase_num(out_phase(conf_of(k_sel), j))) -: 16]) ok = 1'b0;
      if (ok) n_fb++;
      else begin n_err++; $display("FAIL: modulator feedback after k=%0d @%0t", k_sel, $time); end
    end
    if (dut.pkt_vld) begin
      automatic logic [127:0] p = dut.pkt;
      automatic logic [95:0] a = dut.adc_w;
      automatic logic [47:0] d = dut.dac_w;
      automatic logic ok = p[31] == 1'b0 && p[30:25] == {a[95], a[79], a[63], a[47], a[31], a[15]}
                        && p[24:22] == {d[47], d[31], d[15]} && p[21:16] == conf_of(k_sel)
                        && p[15:0] == 16'(dut.mem_ptr);
      if (dut.selector) begin ok = ok && p[127:32] == {a[95:48], d}; n_fmt2++; end
      else              begin ok = ok && p[127:32] == a;             n_fmt1++; end
      if (!ok) begin n_err++; $display("FAIL: log record %h @%0t", p, $time); end
    end
    if (dut.ram_b_we) begin
      automatic int w = int'(dut.ram_b_addr);
      shadow[w] = dut.ram_b_wdata;
      n_words++;
      if (dut.ram_b_wdata != dut.pkt[127 - 32*(w % 4) -: 32] ||
          (w % 4 == 0 && dut.ram_b_wdata != dut.pkt[127:96])) begin
        n_err++; $display("FAIL: memory word %0d = %h @%0t", w, dut.ram_b_wdata, $time);
      end
      if (w % 4 == 0 && int'(dut.pkt[15:0]) != w) begin
        n_err++; $display("FAIL: record pointer %0d written at %0d", dut.pkt[15:0], w);
      end
    end
    n_half += int'(dut.evt_half);
    n_full += int'(dut.evt_full);
    n_snap += int'(dut.evt_snap);
  end

  // switch safety: per output no forward MOSFET of one input together with a
  // reverse MOSFET of another, and never all six off
  function automatic logic gate_ok(input logic [5:0] g);
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++)
      if (i != j && g[2*i] && g[2*j+1]) return 1'b0;
    return |g;
  endfunction
  function automatic logic [5:0] full_on(input phase_t p);
    return 6'b11 << (2 * int'(phase_num(p)));
  endfunction
  always @(negedge clk) if (rst_n) begin
    for (int j = 0; j < 3; j++) if (!gate_ok(gate[6*j +: 6])) n_bad_gate++;
    if (dut.g_od[0].comm_done) begin n_comm++; if (gate[5:0]   != full_on(out_phase(dut.conf_sel, 0))) n_bad_gate++; end
    if (dut.g_od[1].comm_done) begin n_comm++; if (gate[11:6]  != full_on(out_phase(dut.conf_sel, 1))) n_bad_gate++; end
    if (dut.g_od[2].comm_done) begin n_comm++; if (gate[17:12] != full_on(out_phase(dut.conf_sel, 2))) n_bad_gate++; end
  end

  // modulator saturation (second or third integrator at its limit)
  function automatic logic at_lim(input logic signed [18:0] v);
    return v == 19'sd62500 || v == -19'sd62500;
  endfunction
  always @(negedge clk) if (rst_n && dut.mod_vld[0]) begin
    if (at_lim(dut.g_vmod[0].u_mod.v2p) || at_lim(dut.g_vmod[0].u_mod.v3p) ||
        at_lim(dut.g_vmod[1].u_mod.v2p) || at_lim(dut.g_vmod[1].u_mod.v3p) ||
        at_lim(dut.g_vmod[2].u_mod.v2p) || at_lim(dut.g_vmod[2].u_mod.v3p) ||
        at_lim(dut.u_qmod.v2p) || at_lim(dut.u_qmod.v3p)) n_sat++;
  end

  // tracking of the output voltages: 50-sample means of (desired - applied)
  real trk_err [3], trk_sum = 0.0;
  int trk_n = 0, trk_win = 0, trk_on = 0;
  initial for (int j = 0; j < 3; j++) trk_err[j] = 0.0;
  always @(negedge clk) if (rst_n && dut.dac_vld && trk_on != 0) begin
    for (int j = 0; j < 3; j++)
      trk_err[j] += real'($signed(dut.dac_w[47 - 16*j -: 16])) - real'(dut.vact[j]);
    trk_n++;
    if (trk_n == 50) begin
      for (int j = 0; j < 3; j++) begin
        trk_sum += (trk_err[j] < 0.0 ? -trk_err[j] : trk_err[j]) / 50.0;
        trk_err[j] = 0.0;
      end
      trk_n = 0; trk_win++;
    end
  end

  // period of reference 1 in samples, from its rising zero crossings
  int smp = 0, last_x = -1, period = 0;
  logic signed [15:0] ref_prev = '0;
  always @(negedge clk) if (rst_n && dut.dac_vld) begin
    automatic logic signed [15:0] r = $signed(dut.dac_w[47:32]);
    smp++;
    if (ref_prev < 0 && r >= 0) begin
      if (last_x >= 0) period = smp - last_x;
      last_x = smp;
    end
    ref_prev = r;
  end

  // UART line monitor (8N1)
  byte rx_bytes [$];
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge uart_tx);
      if (rst_n) begin
        repeat (CPB / 2) @(posedge clk);
        for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = uart_tx; end
        repeat (CPB) @(posedge clk);
        if (uart_tx) rx_bytes.push_back(b);
      end
    end
  end

  task automatic uart_send(input logic [7:0] b);
    logic [9:0] f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin uart_rx <= f[i]; repeat (CPB) @(posedge clk); end
  endtask

  task automatic wait_irq(input int maxc, output logic seen);
    int c = 0;
    while (!irq_cpu && c < maxc) begin @(posedge clk); c++; end
    seen = irq_cpu;
  endtask

  // CPU side: read the controller's pending events, clear them, acknowledge
  task automatic service_cif(output logic [31:0] stat);
    logic [31:0] d;
    logic [1:0] r;
    axi_read(INTC + 32'h0, d, r);
    if (d[1]) n_irq++;
    axi_read(CIF + 32'h18, stat, r);
    axi_write(CIF + 32'h18, stat, r);
    axi_write(INTC + 32'hC, 32'h2, r);
  endtask

  initial begin
    logic [31:0] d, stat;
    logic [1:0] r;
    logic seen;
    int w0, per1;
    repeat (20) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk); #1;
    `CHECK(k_sel == 5'd19 && gate == {3{6'b000011}}, "reset: every output on input a")

    // unmapped address
    axi_read(32'h0000_3000, d, r);
    if (r == RESP_DECERR) n_decerr++;
    axi_write(32'h0002_0000, 32'h1, r);
    if (r == RESP_DECERR) n_decerr++;
    `CHECK(n_decerr == 2, "unmapped accesses get DECERR")

    // configuration
    axi_write(CIF + 32'h04, 32'd42949673, r);     // 1 kHz references
    axi_write(CIF + 32'h08, 32'h4000, r);         // amplitude 0.5
    axi_write(CIF + 32'h0C, 32'h0, r);            // no reactive power wanted
    axi_write(CIF + 32'h10, 32'h3A80_0000, r);    // 1/Qdes = 2^-10
    axi_write(INTC + 32'h8, 32'h3, r);
    axi_write(CIF + 32'h1C, 32'h7, r);
    axi_write(UART + 32'h4, 32'h1, r);            // interrupt on received byte
    axi_read(CIF + 32'h04, d, r);
    `CHECK(d == 32'd42949673, "FREQ register")

    // UART receive through the interrupt controller, then transmit
    uart_send(8'h5A);
    wait_irq(2000, seen);
    axi_read(INTC + 32'h0, d, r);
    `CHECK(seen && d[0], "UART interrupt through intc")
    if (seen && d[0]) n_irq++;
    axi_read(UART + 32'h0, d, r);
    if (d[8] && d[7:0] == 8'h5A) n_urx++;
    axi_write(INTC + 32'hC, 32'h1, r);
    repeat (4) @(posedge clk);
    `CHECK(!irq_cpu, "interrupt gone after read and acknowledge")
    axi_write(UART + 32'h0, 32'hC3, r);
    repeat (12 * CPB + 20) @(posedge clk);
    if (rx_bytes.size() == 1 && rx_bytes[0] == 8'hC3) n_utx++;

    // continuous logging, format 1
    trk_on = 1;
    axi_write(CIF + 32'h00, 32'h4, r);
    wait_irq(300000, seen);
    `CHECK(seen, "half-buffer interrupt")
    service_cif(stat);
    `CHECK(stat == 32'h1, "half flag")
    axi_write(CIF + 32'h00, 32'h5, r);           // format 2
    wait_irq(300000, seen);
    `CHECK(seen, "full-buffer interrupt")
    service_cif(stat);
    `CHECK(stat == 32'h2, "full flag")
    trk_on = 0;
    per1 = period;
    `CHECK(per1 == 100, $sformatf("1 kHz reference: period %0d samples", per1))
    if (per1 == 100) n_freq++;
    // the upper half is not being written now: compare it with the record stream
    for (int i = 0; i < 16; i++) begin
      int w = 512 + $urandom_range(0, 511);
      axi_read(RAM + 32'(4 * w), d, r);
      `CHECK(d == shadow[w] && r == RESP_OKAY, $sformatf("memory word %0d over AXI", w))
      n_ramrd++;
    end

    // snapshot at 2 kHz with an unreachable reactive-power demand
    axi_write(CIF + 32'h04, 32'd85899346, r);
    axi_write(CIF + 32'h08, 32'h8000, r);
    axi_write(CIF + 32'h0C, 32'h7000, r);
    axi_write(CIF + 32'h00, 32'hF, r);           // rearm, snapshot, log, format 2
    wait_irq(300000, seen);
    `CHECK(seen, "snapshot interrupt")
    service_cif(stat);
    `CHECK(stat == 32'h4, "snapshot flag")
    w0 = n_words;
    repeat (3000) @(posedge clk);
    `CHECK(n_words == w0, "no writes after the snapshot")
    axi_read(CIF + 32'h20, d, r);
    `CHECK(d == 32'h0, "pointer wrapped to 0 at the end of the snapshot")
    for (int i = 0; i < 16; i++) begin
      int w = $urandom_range(0, 1023);
      axi_read(RAM + 32'(4 * w), d, r);
      `CHECK(d == shadow[w], $sformatf("snapshot word %0d over AXI", w))
      n_ramrd++;
    end
    `CHECK(period == 50, $sformatf("2 kHz reference: period %0d samples", period))
    if (period == 50 && per1 == 100) n_freq++;

    $display("decisions %0d, k changes %0d, commutations %0d, saturated samples %0d",
             n_argmin, n_kchg, n_comm, n_sat);
    $display("records: format1 %0d format2 %0d, words %0d; events half %0d full %0d snap %0d",
             n_fmt1, n_fmt2, n_words, n_half, n_full, n_snap);
    $display("mean 50-sample tracking error %0.1f counts over %0d windows",
             trk_win > 0 ? trk_sum / (3.0 * trk_win) : -1.0, trk_win);
    `CHECK(n_err == 0, $sformatf("%0d decision/record errors", n_err))
    `CHECK(n_bad_gate == 0, $sformatf("%0d unsafe gate patterns", n_bad_gate))
    `CHECK(n_argmin > 500, "decisions taken")
    `CHECK(n_kchg > 0, "configuration changes")
    `CHECK(n_fb == n_argmin || n_fb == n_argmin - 1, "modulator feedback every sample")
    `CHECK(n_comm > 0, "commutations")
    `CHECK(n_sat > 0, "modulator saturation")
    `CHECK(n_fmt1 > 0 && n_fmt2 > 0, "both record formats")
    `CHECK(n_words > 0, "records written")
    `CHECK(n_half > 0 && n_full > 0 && n_snap == 1, "buffer events")
    `CHECK(n_decerr > 0, "decode error")
    `CHECK(n_urx > 0, "UART receive")
    `CHECK(n_utx > 0, "UART transmit")
    `CHECK(n_irq >= 4, "interrupts through intc")
    `CHECK(n_freq == 2, "frequency change")
    `CHECK(n_ramrd > 0, "memory read back")
    `CHECK(trk_win > 0 && trk_sum / (3.0 * trk_win) < 4000.0, "output voltages follow the references")
    `TB_DONE
  end
endmodule
