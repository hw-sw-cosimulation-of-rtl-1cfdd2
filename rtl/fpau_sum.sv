// fpau_sum: IEEE-754 single-precision adder for non-negative operands.
//
// Stage 1: the larger exponent is kept (MAX) and the mantissa of the smaller
//          operand (hidden 1 included) is shifted right by the exponent
//          difference.
// Stage 2: the two 24-bit mantissas, each extended by a leading 0, are added;
//          when the sum carries into bit 24 it is shifted right by one and the
//          exponent incremented. The sign of the result is always 0.
// Both operands are scaled error magnitudes, hence never negative; a sign
// bit on the input is ignored. Exponent 0 is read as +0. Mantissas are
// truncated. Latency 2 cycles from `en` to `done`, pipelined. The structure
// and latency follow the document.
module fpau_sum
  import mc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  f32_t  a,
  input  f32_t  b,
  output f32_t  s,
  output logic  done
);
  logic [23:0] ma, mb, mbig, msml_sh;
  logic [7:0]  emax, ediff;
  logic [24:0] sum;
  logic [23:0] m1a, m1b;
  logic [7:0]  e1;
  logic        v1;

  assign ma = (a.e == 8'd0) ? 24'd0 : {1'b1, a.m};
  assign mb = (b.e == 8'd0) ? 24'd0 : {1'b1, b.m};

  always_comb begin
    if (a.e >= b.e) begin
      emax = a.e; ediff = a.e - b.e; mbig = ma; msml_sh = (ediff > 8'd23) ? 24'd0 : mb >> ediff;
    end else begin
      emax = b.e; ediff = b.e - a.e; mbig = mb; msml_sh = (ediff > 8'd23) ? 24'd0 : ma >> ediff;
    end
  end

  assign sum = {1'b0, m1a} + {1'b0, m1b};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m1a <= '0; m1b <= '0; e1 <= '0; v1 <= 1'b0; s <= '0; done <= 1'b0;
    end else begin
      v1 <= en; m1a <= mbig; m1b <= msml_sh; e1 <= emax;      // stage 1
      done <= v1;                                             // stage 2
      if (sum == 25'd0)  s <= '0;
      else if (sum[24])  s <= '{s: 1'b0, e: e1 + 8'd1, m: sum[23:1]};
      else               s <= '{s: 1'b0, e: e1,        m: sum[22:0]};
    end
  end
endmodule
