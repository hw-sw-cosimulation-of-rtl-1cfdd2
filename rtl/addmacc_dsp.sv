// addmacc_dsp: reactive-power estimate of one switching configuration.
//
// Computes q_adc = dv[0]*ik[0] + dv[1]*ik[1] + dv[2]*ik[2], the scalar
// product of the line-to-line input voltages and the input currents the
// configuration would draw, with a single multiply-accumulate unit used in
// three successive cycles (the role of one DSP slice). Operands are captured
// on `en`; `done` pulses 4 cycles later with `q_adc` (35-bit, saturated) and
// `q_act` = the 16 MSBs of q_adc, the scale the Q modulator works at. The
// algorithm and the widths follow the document; the saturation to 35 bits
// is this design's choice.
module addmacc_dsp (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic signed [2:0][16:0]  dv,
  input  logic signed [2:0][17:0]  ik,
  output logic signed [34:0]       q_adc,
  output logic signed [15:0]       q_act,
  output logic                     done
);
  logic signed [2:0][16:0] dv_r;
  logic signed [2:0][17:0] ik_r;
  logic signed [36:0] acc;
  logic [3:0] ph;                    // one-hot MAC phase
  logic [1:0] sel;
  logic signed [34:0] prod;
  logic signed [36:0] sum;
  logic signed [34:0] q_s;

  always_comb begin
    sel = 2'd0;
    if (ph[1]) sel = 2'd1;
    if (ph[2]) sel = 2'd2;
  end
  assign prod = $signed(dv_r[sel]) * $signed(ik_r[sel]);
  assign sum  = acc + 37'(prod);

  always_comb begin
    if (sum > 37'sd17179869183)        q_s = 35'sh3_FFFF_FFFF;   // 2^34 - 1
    else if (sum < -37'sd17179869184)  q_s = 35'sh4_0000_0000;   // -2^34
    else                               q_s = 35'(sum);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ph <= '0; acc <= '0; done <= 1'b0; q_adc <= '0; q_act <= '0;
      dv_r <= '0; ik_r <= '0;
    end else begin
      done <= 1'b0;
      ph   <= {ph[2:0], en};
      if (en) begin
        dv_r <= dv; ik_r <= ik; acc <= '0;
      end else if (|ph[2:0]) begin
        acc <= sum;
        if (ph[2]) begin
          q_adc <= q_s;
          q_act <= q_s[34:19];
        end
      end
      if (ph[2]) done <= 1'b1;
    end
  end
endmodule
