// addmacc_ev: squared magnitude of the output-voltage error vector.
//
// ev2 = e[0]^2 + e[1]^2 + e[2]^2 for three 18-bit signed errors (the 20-bit
// errors shifted right by 2 to fit an 18-bit multiplier port), computed with
// one multiply-accumulate unit over three cycles. Operands are captured on
// `en`; `done` pulses 4 cycles later with the 37-bit result. The document
// names this value the error magnitude and gives it 37 bits; no square root
// is taken, so the cost uses the squared norm.
module addmacc_ev (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic signed [2:0][17:0]  e,
  output logic signed [36:0]       ev2,
  output logic                     done
);
  logic signed [2:0][17:0] e_r;
  logic signed [36:0] acc;
  logic [3:0] ph;
  logic [1:0] sel;
  logic signed [35:0] prod;

  always_comb begin
    sel = 2'd0;
    if (ph[1]) sel = 2'd1;
    if (ph[2]) sel = 2'd2;
  end
  assign prod = $signed(e_r[sel]) * $signed(e_r[sel]);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ph <= '0; acc <= '0; e_r <= '0; ev2 <= '0; done <= 1'b0;
    end else begin
      done <= ph[2];
      ph   <= {ph[2:0], en};
      if (en) begin
        e_r <= e; acc <= '0;
      end else if (|ph[2:0]) begin
        acc <= acc + 37'(prod);
        if (ph[2]) ev2 <= acc + 37'(prod);
      end
    end
  end
endmodule
