// lod: pipelined leading-one detector of W bits (W a multiple of 4).
//
// Stage 1: every nibble goes through a 4-bit LOD block, giving a local
//          one-hot and a non-zero flag.
// Stage 2: a priority pick over the non-zero flags finds the leading
//          non-zero nibble.
// Stage 3: the local one-hot of that nibble is placed in the W-bit output.
// Each stage ends in a register, so `onehot` (all zero for a zero input) and
// `vld_o` follow `a`/`vld_i` by 3 cycles and a new input can enter every
// cycle. The 4-bit building block and the 3-stage latency follow the
// document; the split of work among the stages is this design's choice.
module lod #(
  parameter int unsigned W = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           vld_i,
  input  logic [W-1:0]   a,
  output logic [W-1:0]   onehot,
  output logic           vld_o
);
  localparam int unsigned NN = W / 4;

  logic [W-1:0]  d_c, d1, d2;
  logic [NN-1:0] nz_c, nz1, sel_c, sel2;
  logic [2:0]    v;

  for (genvar n = 0; n < NN; n++) begin : g_nib
    lod4 u_lod4 (.a(a[4*n +: 4]), .d(d_c[4*n +: 4]), .nz(nz_c[n]));
  end

  always_comb begin
    sel_c = '0;
    for (int n = NN - 1; n >= 0; n--)
      if (nz1[n] && sel_c == '0) sel_c[n] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d1 <= '0; nz1 <= '0; d2 <= '0; sel2 <= '0; onehot <= '0; v <= '0;
    end else begin
      v   <= {v[1:0], vld_i};
      d1  <= d_c;  nz1 <= nz_c;                    // stage 1
      d2  <= d1;   sel2 <= sel_c;                  // stage 2
      for (int n = 0; n < NN; n++)                 // stage 3
        onehot[4*n +: 4] <= sel2[n] ? d2[4*n +: 4] : 4'b0;
    end
  end
  assign vld_o = v[2];
endmodule
