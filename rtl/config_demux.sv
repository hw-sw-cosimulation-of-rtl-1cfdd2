// config_demux: output demultiplexer of one time-shared datapath.
//
// When the datapath signals `done`, the cost and reactive power of the
// configuration it just finished are written into register `slot` (0..8) of
// the lane, where the minimum detector and the Q feedback read them. Reset
// loads all costs with the largest positive float bit pattern so that a slot
// never computed cannot win. The nine-way split follows the document.
module config_demux
  import mc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 done,
  input  logic [3:0]           slot,
  input  f32_t                 cost,
  input  logic signed [15:0]   q_act,
  output logic [8:0][31:0]     cost_o,
  output logic [8:0][15:0]     q_o
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cost_o <= {9{32'h7F7F_FFFF}};
      q_o    <= '0;
    end else if (done && slot < 4'd9) begin
      cost_o[slot] <= cost;
      q_o[slot]    <= q_act;
    end
  end
endmodule
