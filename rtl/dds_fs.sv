// dds_fs: frequency synthesizer producing the three desired output voltages.
//
// A direct digital synthesizer: a PW-bit phase accumulator advances by
// `freq_word` on every `step` pulse (the 100 kHz sample rate), so the output
// frequency is freq_word * f_step / 2**PW. After each step the three phases
// (0, 120 and 240 degrees, i.e. accumulator + 0, + 2**PW/3, + 2*2**PW/3) are
// looked up one after another in the shared sine ROM, multiplied by `ampl`
// (0x8000 = 1.0) and saturated to 16 bits. `dac_value` = {ph1, ph2, ph3},
// phase 1 in the MSBs, changes as a whole and `valid` pulses 5 cycles after
// `step`. The accumulator/LUT/register scheme follows the document; the
// accumulator width, the amplitude multiply and the sequencing are this
// design's choices.
module dds_fs #(
  parameter int unsigned PW = 32,
  parameter int unsigned AW = 10
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               step,
  input  logic [PW-1:0]      freq_word,
  input  logic [15:0]        ampl,
  output logic [47:0]        dac_value,
  output logic               valid
);
  localparam logic [PW-1:0] THIRD = PW'((64'd1 << PW) / 3);

  logic [PW-1:0] acc;
  logic [2:0]    seq;       // one-hot: address of phase 1, 2, 3 issued
  logic [2:0]    seq_d;     // ROM data of phase 1, 2, 3 available
  logic [PW-1:0] pa;
  logic [AW-1:0] addr;
  logic signed [15:0] rom_q;
  logic signed [15:0] ph [3];
  logic signed [32:0] prod;
  logic signed [15:0] scaled;

  always_comb begin
    pa = acc;
    if (seq[1]) pa = acc + THIRD;
    if (seq[2]) pa = acc + THIRD + THIRD;
    addr = pa[PW-1 -: AW];
  end

  sine_rom #(.AW(AW)) u_rom (.clk, .addr, .dout(rom_q));

  assign prod = rom_q * $signed({1'b0, ampl});
  always_comb begin
    if (prod > 33'sd1073709056)        scaled = 16'sh7fff;   // 32767 << 15
    else if (prod < -33'sd1073741824)  scaled = -16'sh8000;
    else                               scaled = 16'(prod >>> 15);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc <= '0; seq <= '0; seq_d <= '0; valid <= 1'b0;
      dac_value <= '0;
      ph[0] <= '0; ph[1] <= '0; ph[2] <= '0;
    end else begin
      valid <= 1'b0;
      if (step) acc <= acc + freq_word;
      seq   <= {seq[1:0], step};
      seq_d <= seq;
      for (int i = 0; i < 3; i++) if (seq_d[i]) ph[i] <= scaled;
      if (seq_d[2]) begin
        dac_value <= {ph[0], ph[1], scaled};
        valid     <= 1'b1;
      end
    end
  end
endmodule
