// cpu_iface: the CPU's register window onto the controller.
//
// One AXI4-Lite slave holds the settings that the firmware changes and
// forwards them to the blocks that use them, exposes live values for
// inspection, and collects the log-memory events into an interrupt.
// Registers (offsets within the block):
//   0x00 CTRL      rw  [0] log format selector, [1] memory mode (0 COCO,
//                      1 Snapshot), [2] logging enable; writing [3] = 1
//                      re-arms a snapshot (self-clearing pulse)
//   0x04 FREQ      rw  synthesizer phase increment (reset: 50 Hz at 100 kHz)
//   0x08 AMPL      rw  synthesizer amplitude, 0x8000 = 1.0 (reset 0x8000)
//   0x0C QDES      rw  desired input reactive power, 16-bit signed
//   0x10 INV_QDES  rw  1/Q_des, float32 (reset 1.0)
//   0x14 INV_VDES  rw  1/(V_des + V_s), float32 (reset 1.0)
//   0x18 IRQ_STAT  r/w1c [0] COCO half, [1] COCO full, [2] snapshot done
//   0x1C IRQ_EN    rw  enable mask for IRQ_STAT
//   0x20 MEM_PTR   r   next DPRAM word address of the memory writer
//   0x24..0x2C ADC r   {V1,V2}, {V3,I1}, {I2,I3}
//   0x30..0x34 DAC r   {ref1,ref2}, {ref3,16'b0}
//   0x38 KSEL      r   configuration index applied last
// `irq` = OR of enabled status bits. The role follows the document; the
// register map and reset values are this design's choices.
module cpu_iface
  import mc_pkg::*;
#(
  parameter logic [31:0] FREQ_RESET = 32'd2147484
) (
  input  logic          clk,
  input  logic          rst_n,
  input  axil_req_t     s_axi_req,
  output axil_rsp_t     s_axi_rsp,
  output logic          selector,
  output logic          mem_mode,
  output logic          log_en,
  output logic          rearm,
  output logic [31:0]   freq_word,
  output logic [15:0]   ampl,
  output logic [15:0]   qdes,
  output f32_t          inv_qdes,
  output f32_t          inv_vdes,
  input  logic          evt_half,
  input  logic          evt_full,
  input  logic          evt_snap,
  input  logic [15:0]   mem_ptr,
  input  logic [95:0]   adc,
  input  logic [47:0]   dac,
  input  kidx_t         k_sel,
  output logic          irq
);
  logic wr, rd;
  logic [31:0] waddr, raddr, wdata, rdata;
  logic [3:0] wstrb;
  logic [2:0] stat, ien;

  axil_slave_port #(.RD_LAT(0)) u_port (
    .clk, .rst_n, .req(s_axi_req), .rsp(s_axi_rsp),
    .wr, .waddr, .wdata, .wstrb, .rd, .raddr, .rdata
  );

  always_comb begin
    case (raddr[5:2])
      4'h0: rdata = {29'b0, log_en, mem_mode, selector};
      4'h1: rdata = freq_word;
      4'h2: rdata = {16'b0, ampl};
      4'h3: rdata = {{16{qdes[15]}}, qdes};
      4'h4: rdata = inv_qdes;
      4'h5: rdata = inv_vdes;
      4'h6: rdata = {29'b0, stat};
      4'h7: rdata = {29'b0, ien};
      4'h8: rdata = {16'b0, mem_ptr};
      4'h9: rdata = adc[95:64];
      4'hA: rdata = adc[63:32];
      4'hB: rdata = adc[31:0];
      4'hC: rdata = dac[47:16];
      4'hD: rdata = {dac[15:0], 16'b0};
      4'hE: rdata = {27'b0, k_sel};
      default: rdata = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      selector <= 1'b0; mem_mode <= 1'b0; log_en <= 1'b0; rearm <= 1'b0;
      freq_word <= FREQ_RESET; ampl <= 16'h8000; qdes <= '0;
      inv_qdes <= 32'h3F80_0000; inv_vdes <= 32'h3F80_0000;
      stat <= '0; ien <= '0; irq <= 1'b0;
    end else begin
      rearm <= 1'b0;
      stat  <= stat | {evt_snap, evt_full, evt_half};
      if (wr) begin
        case (waddr[5:2])
          4'h0: begin
            selector <= wdata[0]; mem_mode <= wdata[1]; log_en <= wdata[2]; rearm <= wdata[3];
          end
          4'h1: freq_word <= wdata;
          4'h2: ampl      <= wdata[15:0];
          4'h3: qdes      <= wdata[15:0];
          4'h4: inv_qdes  <= wdata;
          4'h5: inv_vdes  <= wdata;
          4'h6: stat      <= (stat | {evt_snap, evt_full, evt_half}) & ~wdata[2:0];
          4'h7: ien       <= wdata[2:0];
          default: ;
        endcase
      end
      irq <= |(stat & ien);
    end
  end
endmodule
