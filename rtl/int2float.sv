// int2float: signed W-bit integer to IEEE-754 single precision.
//
// The magnitude goes through the 3-stage pipelined leading-one detector; a
// fourth stage turns the one-hot into the bit position p (the multiplexer
// stage), sets exponent = 127 + p and shifts the bits below the leading one
// into the 23-bit mantissa (truncated, not rounded). Latency is 4 cycles from
// `en` to `done`, fully pipelined. Zero maps to +0.0. The LOD-based method
// and the 4-cycle latency follow the document; truncation is this design's
// choice. W must be at least 24.
module int2float
  import mc_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [W-1:0]  x,
  output f32_t                 f,
  output logic                 done
);
  logic [W-1:0] mag, mag_d [3];
  logic         sgn_d [3];
  logic [W-1:0] oh;
  logic         lod_v;
  logic [$clog2(W)-1:0] p;
  logic [W-1:0] norm;

  assign mag = x[W-1] ? W'(-x) : W'(x);

  lod #(.W(W)) u_lod (.clk, .rst_n, .vld_i(en), .a(mag), .onehot(oh), .vld_o(lod_v));

  always_comb begin
    p = '0;
    for (int i = 0; i < W; i++) if (oh[i]) p = $clog2(W)'(i);
  end
  assign norm = mag_d[2] << (W - 1 - int'(p));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      f <= '0; done <= 1'b0;
      for (int i = 0; i < 3; i++) begin mag_d[i] <= '0; sgn_d[i] <= 1'b0; end
    end else begin
      mag_d[0] <= mag;      sgn_d[0] <= x[W-1];
      mag_d[1] <= mag_d[0]; sgn_d[1] <= sgn_d[0];
      mag_d[2] <= mag_d[1]; sgn_d[2] <= sgn_d[1];
      done <= lod_v;
      if (oh == '0) f <= '0;
      else begin
        f.s <= sgn_d[2];
        f.e <= 8'(127 + p);
        f.m <= norm[W-2 -: 23];
      end
    end
  end
endmodule
