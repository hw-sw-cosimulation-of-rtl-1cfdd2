// sinc3_decimator: third-order CIC (sinc^3) filter for one sigma-delta ADC
// bitstream.
//
// The 1-bit stream (1 -> +1, 0 -> -1) is integrated three times at the bit
// rate (every cycle with `ce`, 20 MHz in the system). On `dec_tick`, which the
// caller raises together with `ce` once every R bits, three comb stages run at
// the decimated rate and the result is scaled by >>> OUT_SHIFT into a 16-bit
// word. With R = 200 the filter gain is 200^3 = 8,000,000 and >>> 8 maps a
// full-scale stream to +/-31250, the word range used throughout the design.
// Integrators use wrap-around arithmetic, which the combs undo.
//
// The order of the filter, the decimation to 100 kHz and the 16-bit width
// follow the document; the Hogenauer structure and the output scaling are
// this design's choices. `dout` is updated one cycle after `dec_tick` and
// held until the next one.
module sinc3_decimator #(
  parameter int unsigned R         = 200,
  parameter int unsigned OUT_SHIFT = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ce,
  input  logic               bit_in,
  input  logic               dec_tick,
  output logic signed [15:0] dout
);
  localparam int unsigned GW = 3 * $clog2(R) + 3;   // growth bits + sign + margin

  typedef logic signed [GW-1:0] acc_t;

  acc_t i1, i2, i3;          // integrators
  acc_t c1d, c2d, c3d;       // comb delay elements
  acc_t c1, c2, c3;
  acc_t x;

  assign x  = bit_in ? acc_t'(1) : -acc_t'(1);
  assign c1 = i3 - c1d;
  assign c2 = c1 - c2d;
  assign c3 = c2 - c3d;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      i1 <= '0; i2 <= '0; i3 <= '0;
      c1d <= '0; c2d <= '0; c3d <= '0;
      dout <= '0;
    end else if (ce) begin
      i1 <= i1 + x;
      i2 <= i2 + i1;
      i3 <= i3 + i2;
      if (dec_tick) begin
        c1d  <= i3;
        c2d  <= c1;
        c3d  <= c2;
        dout <= 16'(c3 >>> OUT_SHIFT);
      end
    end
  end
endmodule
