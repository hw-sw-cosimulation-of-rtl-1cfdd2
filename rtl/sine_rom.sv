// sine_rom: sine look-up table for the frequency synthesizer.
//
// 2**AW entries of 16-bit signed samples, entry i = round(31250*sin(2*pi*i/2**AW)),
// i.e. one full period with the +/-31250 peak used for all reference
// waveforms. The table is loaded from rtl/sine_rom.hex (AW = 10). Reads are
// synchronous: `dout` shows the entry at `addr` one clock after it is given.
// The LUT itself follows the document; its size is this design's choice.
module sine_rom #(
  parameter int unsigned AW = 10
) (
  input  logic                 clk,
  input  logic [AW-1:0]        addr,
  output logic signed [15:0]   dout
);
  logic [15:0] mem [2**AW];

  initial $readmemh("rtl/sine_rom.hex", mem);

  always_ff @(posedge clk) dout <= mem[addr];
endmodule
