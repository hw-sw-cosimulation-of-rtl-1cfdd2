// adc_bank: front end for the six sigma-delta ADCs (three input voltages,
// three load currents).
//
// Each bitstream goes through its own sinc^3 decimator. One shared counter
// of the bit-rate enable `ce` (20 MHz) raises the decimation tick every R
// bits, so with R = 200 a new set of six 16-bit words appears at 100 kHz.
// `data_out` packs them as {V1, V2, V3, I1, I2, I3}, V1 in the MSBs, and
// `data_ready` pulses for one clock when they are updated (one cycle after
// the tick). The decimation figures and the 96-bit bundle follow the
// document; the packing order is this design's choice, matching the log
// format.
module adc_bank #(
  parameter int unsigned R = 200
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  input  logic [5:0]  bs,          // bs[5] = V1 ... bs[0] = I3
  output logic [95:0] data_out,
  output logic        data_ready
);
  logic [$clog2(R)-1:0] cnt;
  logic tick;

  assign tick = ce && (cnt == $bits(cnt)'(R - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt        <= '0;
      data_ready <= 1'b0;
    end else begin
      data_ready <= tick;
      if (ce) cnt <= tick ? '0 : cnt + 1'b1;
    end
  end

  for (genvar ch = 0; ch < 6; ch++) begin : g_ch
    logic signed [15:0] w;
    sinc3_decimator #(.R(R)) u_sinc (
      .clk, .rst_n, .ce, .bit_in(bs[ch]), .dec_tick(tick), .dout(w)
    );
    assign data_out[16*ch +: 16] = w;
  end
endmodule
