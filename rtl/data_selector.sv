// data_selector: formats one 128-bit log record per sample for the DPRAM.
//
// selector = 0 (format 1):
//   [127:32] ADC_DATA  {V1,V2,V3,I1,I2,I3}   96 bits
//   selector = 1 (format 2):
//   [127:80] ADC_DATA  {V1,V2,V3}            48 bits
//   [79:32]  DAC_DATA  {ref1,ref2,ref3}      48 bits
// common tail:
//   [31]     '0'
//   [30:25]  ADC_SIGN  sign bits of V1..I3 (V1 in bit 30)
//   [24:22]  DAC_DATA(47), DAC_DATA(31), DAC_DATA(15): signs of the references
//   [21:16]  OUT_CONF  phase codes applied to outputs A, B, C
//   [15:0]   EXTRA_IN  DPRAM address the record is written to
// The record is registered on `load`; `vld` pulses one cycle later. Field
// order and widths follow the document's two formats.
module data_selector (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic          selector,
  input  logic [95:0]   adc,
  input  logic [47:0]   dac,
  input  logic [5:0]    out_conf,
  input  logic [15:0]   extra_in,
  output logic [127:0]  pkt,
  output logic          vld
);
  logic [5:0] adc_sign;
  logic [95:0] head;

  for (genvar c = 0; c < 6; c++) begin : g_sign
    assign adc_sign[5-c] = adc[95 - 16*c];
  end

  assign head = selector ? {adc[95:48], dac} : adc;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pkt <= '0; vld <= 1'b0;
    end else begin
      vld <= load;
      if (load)
        pkt <= {head, 1'b0, adc_sign, dac[47], dac[31], dac[15], out_conf, extra_in};
    end
  end
endmodule
