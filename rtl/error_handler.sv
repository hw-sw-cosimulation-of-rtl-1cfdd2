// error_handler: errors between the modulator outputs and what one
// configuration would produce.
//   e_q    = q_ref - q_act            reactive power
//   e_v[j] = v_ref[j] - vk[j]         output voltage j (A, B, C)
// All results are 20-bit signed, which holds any difference of a 19-bit
// modulator output and a 16-bit word. Inputs are sampled on `en`; results and
// `done` appear one cycle later. Function and widths follow the document.
module error_handler (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic signed [18:0]       q_ref,
  input  logic signed [15:0]       q_act,
  input  logic signed [2:0][18:0]  v_ref,
  input  logic signed [2:0][15:0]  vk,
  output logic signed [19:0]       e_q,
  output logic signed [2:0][19:0]  e_v,
  output logic                     done
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      e_q <= '0; e_v <= '0; done <= 1'b0;
    end else begin
      done <= en;
      if (en) begin
        e_q <= 20'(q_ref) - 20'(q_act);
        for (int j = 0; j < 3; j++)
          e_v[j] <= 20'($signed(v_ref[j])) - 20'($signed(vk[j]));
      end
    end
  end
endmodule
