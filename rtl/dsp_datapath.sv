// dsp_datapath: cost of one switching configuration, the unit that is
// time-shared by nine configurations.
//
// From the operands of configuration k (from config_mux) and the modulator
// outputs it computes
//   cost = |q_ref - q_act| * (1/Q_des) + ||(v_ref - vk) >>> 2||^2 * (1/(V_des+V_s))
// as a float32, through a chain of units handing over with one-cycle
// enable/done pulses:
//   addmacc_dsp (4) -> error_handler (1) -> +- abs -> int2float (4) -> fpau_mult (14) --+
//                                            +- >>>2 -> addmacc_ev (4) -> int2float (4)  |
//                                                       -> fpau_mult (14) ---------------+-> fpau_sum (2)
// The reactive-power branch finishes first; its product is held until the
// voltage branch is done, then the float adder runs. Latency from `en` to
// `done` is 29 cycles, below the 50-cycle slot of the 2 MHz mux. `slot_o` and
// `q_act` (the 16-bit reactive power of this configuration, needed by the Q
// modulator once a configuration is chosen) are returned with `done`.
// The chain and the unit sequence follow the document; the cost adds the two
// normalised errors as the document's datapath does (its cost formula
// squares each term).
module dsp_datapath
  import mc_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic [3:0]               slot,
  input  logic signed [2:0][16:0]  dv,
  input  logic signed [2:0][17:0]  ik,
  input  logic signed [2:0][15:0]  vk,
  input  logic signed [18:0]       q_ref,
  input  logic signed [2:0][18:0]  v_ref,
  input  f32_t                     inv_qdes,
  input  f32_t                     inv_vdes,
  output f32_t                     cost,
  output logic signed [15:0]       q_act,
  output logic [3:0]               slot_o,
  output logic                     done
);
  logic signed [34:0] q_adc;
  logic signed [15:0] q_act_w;
  logic d_dsp, d_err, d_ev, d_fq, d_fv, d_mq, d_mv;
  logic signed [19:0] e_q;
  logic signed [2:0][19:0] e_v;
  logic signed [2:0][17:0] e_v_sh;
  logic signed [19:0] e_q_abs;
  logic signed [36:0] ev2;
  f32_t fq, fv, pq, pv, pq_hold;
  logic mq_busy, mv_busy, q_ready;

  addmacc_dsp u_dsp (.clk, .rst_n, .en, .dv, .ik, .q_adc, .q_act(q_act_w), .done(d_dsp));

  error_handler u_err (.clk, .rst_n, .en(d_dsp), .q_ref, .q_act(q_act_w), .v_ref, .vk,
                       .e_q, .e_v, .done(d_err));

  // |e_q| (ABS block) and the >>2 of the voltage errors
  assign e_q_abs = e_q[19] ? -e_q : e_q;
  for (genvar j = 0; j < 3; j++) begin : g_sh
    assign e_v_sh[j] = 18'($signed(e_v[j]) >>> 2);
  end

  // reactive-power branch
  int2float #(.W(32)) u_i2f_q (.clk, .rst_n, .en(d_err), .x(32'(e_q_abs)), .f(fq), .done(d_fq));
  fpau_mult u_mq (.clk, .rst_n, .en(d_fq), .a(fq), .b(inv_qdes), .p(pq), .done(d_mq), .busy(mq_busy));

  // voltage branch
  addmacc_ev u_ev (.clk, .rst_n, .en(d_err), .e(e_v_sh), .ev2, .done(d_ev));
  int2float #(.W(40)) u_i2f_v (.clk, .rst_n, .en(d_ev), .x(40'(ev2)), .f(fv), .done(d_fv));
  fpau_mult u_mv (.clk, .rst_n, .en(d_fv), .a(fv), .b(inv_vdes), .p(pv), .done(d_mv), .busy(mv_busy));

  fpau_sum u_sum (.clk, .rst_n, .en(d_mv), .a(q_ready ? pq_hold : pq), .b(pv), .s(cost), .done(done));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pq_hold <= '0; q_ready <= 1'b0; slot_o <= '0; q_act <= '0;
    end else begin
      if (en) slot_o <= slot;
      if (d_dsp) q_act <= q_act_w;
      if (d_mq) begin pq_hold <= pq; q_ready <= 1'b1; end
      if (d_mv) q_ready <= 1'b0;
    end
  end
endmodule
