// mc_top: sigma-delta controller for a three-phase direct matrix converter.
//
// Every 100 kHz sample the controller picks one of the 27 allowed switch
// configurations of the 3x3 switch matrix. Three sigma-delta modulators turn
// the desired output voltages, and a fourth the desired input reactive power,
// into references; each configuration is scored by how far its output
// voltages and reactive power would be from those references; the cheapest
// one is applied and fed back to the modulators as their quantised value.
//
// Per sample (all on one 100 MHz clock, 20 MHz work done on a clock enable):
//   1. adc_bank: six sinc^3 decimators deliver V1..V3 (input voltages) and
//      I1..I3 (load currents) as 16-bit words (`data_ready`).
//   2. dds_fs steps and produces the three desired voltages (5 cycles);
//      the four ciff_modulators then compute v_ref and q_ref (1 cycle).
//   3. Three lanes of config_mux -> dsp_datapath -> config_demux score the
//      27 configurations, 9 per lane, one every MUX_DIV cycles.
//   4. min_detector finds the cheapest configuration (5 cycles) -> `k_sel`.
//   5. The three output_drivers commutate to the new input phases; the
//      modulators' quantised values are latched (S_k * V_s for voltages, the
//      reactive power of configuration k for Q); data_selector builds a log
//      record that mem_writer stores in the dpram.
// The CPU reaches cpu_iface, intc, uart and ramc through axi_xbar; its AXI
// master port, interrupt line and the serial pins are top-level ports.
// Timing: with the defaults a sample lasts R*CE_DIV = 1000 cycles and the
// decision is ready about 490 cycles after `data_ready`. MUX_DIV must be at
// least 34 (datapath latency) and 9*MUX_DIV + 20 less than R*CE_DIV.
// Structure and rates follow the document; using a single clock with
// enables and the sequencing details are this design's choices.
module mc_top
  import mc_pkg::*;
#(
  parameter int unsigned R            = 200,
  parameter int unsigned CE_DIV       = 5,
  parameter int unsigned MUX_DIV      = 50,
  parameter int unsigned MEM_DEPTH    = 1024,
  parameter int unsigned STEP_CYCLES  = 10,
  parameter int unsigned CLKS_PER_BIT = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [5:0]  adc_bs,        // [5] V1, [4] V2, [3] V3, [2] I1, [1] I2, [0] I3
  input  axil_req_t   s_axi_req,
  output axil_rsp_t   s_axi_rsp,
  output logic        irq_cpu,
  input  logic        uart_rx,
  output logic        uart_tx,
  output logic [17:0] gate,          // [6*j + 2*i + {0 fwd, 1 rev}], output j, input i
  output kidx_t       k_sel
);
  localparam int unsigned MAW = $clog2(MEM_DEPTH);

  // ---------------- 20 MHz clock enable ----------------
  logic [$clog2(CE_DIV)-1:0] ce_cnt;
  logic ce20;
  always_ff @(posedge clk) begin
    if (!rst_n) ce_cnt <= '0;
    else        ce_cnt <= (ce_cnt == $bits(ce_cnt)'(CE_DIV - 1)) ? '0 : ce_cnt + 1'b1;
  end
  assign ce20 = (ce_cnt == '0);

  // ---------------- CPU side ----------------
  axil_req_t [3:0] sreq;
  axil_rsp_t [3:0] srsp;
  logic irq_uart, irq_cif;
  logic selector, mem_mode, log_en, rearm;
  logic [31:0] freq_word;
  logic [15:0] ampl, qdes;
  f32_t inv_qdes, inv_vdes;
  logic evt_half, evt_full, evt_snap;
  logic [MAW-1:0] mem_ptr;

  axi_xbar u_xbar (.clk, .rst_n, .m_req(s_axi_req), .m_rsp(s_axi_rsp), .s_req(sreq), .s_rsp(srsp));

  uart #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .clk, .rst_n, .s_axi_req(sreq[0]), .s_axi_rsp(srsp[0]), .rx(uart_rx), .tx(uart_tx), .irq(irq_uart));

  intc #(.NSRC(2)) u_intc (
    .clk, .rst_n, .s_axi_req(sreq[1]), .s_axi_rsp(srsp[1]), .src({irq_cif, irq_uart}), .irq(irq_cpu));

  logic [95:0] adc_w;
  logic [47:0] dac_w;

  cpu_iface u_cif (
    .clk, .rst_n, .s_axi_req(sreq[2]), .s_axi_rsp(srsp[2]),
    .selector, .mem_mode, .log_en, .rearm, .freq_word, .ampl, .qdes, .inv_qdes, .inv_vdes,
    .evt_half, .evt_full, .evt_snap, .mem_ptr(16'(mem_ptr)), .adc(adc_w), .dac(dac_w),
    .k_sel, .irq(irq_cif));

  logic          ram_a_en, ram_a_we, ram_b_we;
  logic [MAW-1:0] ram_a_addr, ram_b_addr;
  logic [31:0]   ram_a_wdata, ram_a_rdata, ram_b_wdata;

  ramc #(.DEPTH(MEM_DEPTH)) u_ramc (
    .clk, .rst_n, .s_axi_req(sreq[3]), .s_axi_rsp(srsp[3]),
    .a_en(ram_a_en), .a_we(ram_a_we), .a_addr(ram_a_addr), .a_wdata(ram_a_wdata), .a_rdata(ram_a_rdata));

  dpram #(.DEPTH(MEM_DEPTH)) u_ram (
    .clk, .a_en(ram_a_en), .a_we(ram_a_we), .a_addr(ram_a_addr), .a_wdata(ram_a_wdata),
    .a_rdata(ram_a_rdata), .b_we(ram_b_we), .b_addr(ram_b_addr), .b_wdata(ram_b_wdata));

  // ---------------- acquisition and references ----------------
  logic adc_rdy, dac_vld;

  adc_bank #(.R(R)) u_adc (.clk, .rst_n, .ce(ce20), .bs(adc_bs), .data_out(adc_w), .data_ready(adc_rdy));

  dds_fs u_fs (.clk, .rst_n, .step(adc_rdy), .freq_word, .ampl, .dac_value(dac_w), .valid(dac_vld));

  // quantised values fed back to the modulators
  logic signed [15:0] vact [3];
  logic signed [15:0] qact_sel;
  logic signed [18:0] vref [3];
  logic signed [18:0] qref;
  logic [3:0] mod_vld;

  for (genvar j = 0; j < 3; j++) begin : g_vmod
    ciff_modulator u_mod (.clk, .rst_n, .upd(dac_vld), .vdes(dac_w[47 - 16*j -: 16]),
                          .vact(vact[j]), .vref(vref[j]), .vld(mod_vld[j]));
  end
  ciff_modulator u_qmod (.clk, .rst_n, .upd(dac_vld), .vdes(qdes), .vact(qact_sel),
                         .vref(qref), .vld(mod_vld[3]));

  // ---------------- three time-shared cost lanes ----------------
  logic [2:0] sweep_done;
  logic [NLANE-1:0][8:0][31:0] lane_cost;
  logic [NLANE-1:0][8:0][15:0] lane_q;
  logic signed [2:0][18:0] vref_p;

  for (genvar j = 0; j < 3; j++) begin : g_vref
    assign vref_p[j] = vref[j];
  end

  for (genvar l = 0; l < NLANE; l++) begin : g_lane
    logic en, dp_done;
    logic [3:0] slot, slot_o;
    kidx_t k;
    logic signed [2:0][16:0] dv;
    logic signed [2:0][17:0] ik;
    logic signed [2:0][15:0] vk;
    logic busy;
    f32_t cost;
    logic signed [15:0] q_act;

    config_mux #(.LANE(l), .MUX_DIV(MUX_DIV)) u_mux (
      .clk, .rst_n, .start(mod_vld[0]), .adc(adc_w), .en, .slot, .k, .dv, .ik, .vk,
      .busy, .sweep_done(sweep_done[l]));

    dsp_datapath u_dp (
      .clk, .rst_n, .en, .slot, .dv, .ik, .vk, .q_ref(qref), .v_ref(vref_p),
      .inv_qdes, .inv_vdes, .cost, .q_act, .slot_o, .done(dp_done));

    config_demux u_demux (
      .clk, .rst_n, .done(dp_done), .slot(slot_o), .cost, .q_act,
      .cost_o(lane_cost[l]), .q_o(lane_q[l]));
  end

  // ---------------- quantiser ----------------
  logic [NCONF-1:0][31:0] all_cost;
  logic [NCONF-1:0][15:0] all_q;
  kidx_t k_min;
  logic [31:0] min_cost;
  logic min_vld;

  assign all_cost = lane_cost;
  assign all_q    = lane_q;

  min_detector #(.N(NCONF)) u_min (.clk, .rst_n, .start(sweep_done[0]), .cost(all_cost),
                                   .k(k_min), .min_cost, .vld(min_vld));

  conf_t conf_sel;
  assign conf_sel = conf_of(k_sel);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      k_sel <= 5'd19;                       // all outputs on input a
      qact_sel <= '0;
      for (int j = 0; j < 3; j++) vact[j] <= '0;
    end else if (min_vld) begin
      k_sel    <= k_min;
      qact_sel <= all_q[k_min - 5'd1];
      for (int j = 0; j < 3; j++)
        vact[j] <= adc_w[95 - 16*int'(phase_num(out_phase(conf_of(k_min), j))) -: 16];
    end
  end

  // ---------------- output drivers ----------------
  for (genvar j = 0; j < 3; j++) begin : g_od
    logic comm, comm_done;
    output_driver #(.STEP_CYCLES(STEP_CYCLES)) u_od (
      .clk, .rst_n, .target(out_phase(conf_sel, j)), .i_neg(adc_w[47 - 16*j]),
      .gate(gate[6*j +: 6]), .commuting(comm), .commutation_done(comm_done));
  end

  // ---------------- logging ----------------
  logic log_load, pkt_vld;
  logic [127:0] pkt;
  logic mw_busy, snap_done;

  always_ff @(posedge clk) begin
    if (!rst_n) log_load <= 1'b0;
    else        log_load <= min_vld;        // one cycle after k_sel is updated
  end

  data_selector u_sel (.clk, .rst_n, .load(log_load), .selector, .adc(adc_w), .dac(dac_w),
                       .out_conf(conf_sel), .extra_in(16'(mem_ptr)), .pkt, .vld(pkt_vld));

  mem_writer #(.DEPTH(MEM_DEPTH)) u_mw (
    .clk, .rst_n, .ce(ce20), .enable(log_en), .mode(mem_mode), .rearm, .pkt_vld, .pkt,
    .we(ram_b_we), .waddr(ram_b_addr), .wdata(ram_b_wdata), .ptr(mem_ptr), .busy(mw_busy),
    .snap_done, .evt_half, .evt_full, .evt_snap);
endmodule
