// fpau_mult: IEEE-754 single-precision multiplier built around one narrow
// multiplier.
//
// sign = sA xor sB, exponent = eA + eB - 127 (+1 when the mantissa product
// reaches 2.0). The 24 x 24-bit product of the mantissas (hidden 1 included)
// is formed with the Karatsuba-Ofman identity on 12-bit halves
//   X*Y = 2^24 X1Y1 + 2^12 (X1Y1 + X0Y0 - (X1-X0)(Y1-Y0)) + X0Y0
// so a single 13 x 13 signed multiplier is used three times (cycles 1-3) and
// the rest is additions and shifts. The 48-bit product is truncated to 23
// mantissa bits. An operand with exponent 0 gives +0; there is no overflow,
// underflow, NaN or infinity handling. Operands are captured on `en`; `p` and
// `done` appear LATENCY (14) cycles later; a new `en` is accepted only when
// idle (`busy` low). The algorithm and the 14-cycle latency follow the
// document; the cycle schedule is this design's choice.
module fpau_mult
  import mc_pkg::*;
#(
  parameter int unsigned LATENCY = 14
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  f32_t  a,
  input  f32_t  b,
  output f32_t  p,
  output logic  done,
  output logic  busy
);
  f32_t ar, br;
  logic [4:0] cnt;
  logic [23:0] X, Y;
  logic signed [12:0] ma, mb;
  logic signed [25:0] m;
  logic [23:0] hh, ll;
  logic signed [25:0] dd;
  logic signed [27:0] mid;
  logic [47:0] prod;
  logic zero;
  logic signed [9:0] ex;

  assign X = {1'b1, ar.m};
  assign Y = {1'b1, br.m};

  // operand selection for the shared multiplier
  always_comb begin
    case (cnt)
      5'd1:    begin ma = {1'b0, X[23:12]};          mb = {1'b0, Y[23:12]}; end
      5'd2:    begin ma = {1'b0, X[11:0]};           mb = {1'b0, Y[11:0]};  end
      default: begin ma = 13'(X[23:12]) - 13'(X[11:0]); mb = 13'(Y[23:12]) - 13'(Y[11:0]); end
    endcase
  end
  assign m = ma * mb;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= '0; busy <= 1'b0; done <= 1'b0; p <= '0;
      ar <= '0; br <= '0; hh <= '0; ll <= '0; dd <= '0; mid <= '0; prod <= '0;
      zero <= 1'b0; ex <= '0;
    end else begin
      done <= 1'b0;
      if (en && !busy) begin
        ar <= a; br <= b; busy <= 1'b1; cnt <= 5'd1;
      end else if (busy) begin
        cnt <= cnt + 1'b1;
        case (cnt)
          5'd1: hh <= 24'(m);
          5'd2: ll <= 24'(m);
          5'd3: dd <= m;
          5'd4: mid <= 28'(hh) + 28'(ll) - 28'(dd);
          5'd5: begin
            prod <= {hh, 24'b0} + (48'($unsigned(mid)) << 12) + 48'(ll);
            zero <= (ar.e == 8'd0) || (br.e == 8'd0);
            ex   <= 10'(ar.e) + 10'(br.e) - 10'sd127;
          end
          5'd6: begin
            if (zero) p <= '0;
            else if (prod[47]) p <= '{s: ar.s ^ br.s, e: 8'(ex + 10'sd1), m: prod[46:24]};
            else               p <= '{s: ar.s ^ br.s, e: 8'(ex),          m: prod[45:23]};
          end
          default: ;
        endcase
        if (cnt == 5'(LATENCY - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          cnt  <= '0;
        end
      end
    end
  end
endmodule
