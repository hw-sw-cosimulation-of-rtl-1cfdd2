// ciff_modulator: second-order sigma-delta modulator, cascade of integrators
// with feed-forward (CIFF) structure.
//
// Once per sample (`upd` pulse) with the desired value vdes[n] and the value
// the quantiser actually produced, vact:
//   v1[n] = vdes[n] - vact
//   v2[n] = sat(v1[n] + v2[n-1])          delay-free integrator
//   v3[n] = sat(v2[n-1] + v3[n-1])        delaying integrator
//   vref[n] = v2[n] + v3[n] + vdes[n]     feed-forward sum, to the quantiser
// The integrators saturate at +/-SAT (62500, twice the +/-31250 signal peak)
// to bound the state. The structure and the saturation level follow the
// document; all branch coefficients are 1 because the document gives none.
// `vref` is 19 bits wide so that vref - vact fits the 20-bit error word of the
// datapath. `vref` and `vld` are registered: they appear one cycle after `upd`.
module ciff_modulator #(
  parameter int SAT = 62500
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               upd,
  input  logic signed [15:0] vdes,
  input  logic signed [15:0] vact,
  output logic signed [18:0] vref,
  output logic               vld
);
  typedef logic signed [18:0] w_t;

  w_t v2p, v3p;             // v2[n-1], v3[n-1]
  w_t v1, v2, v3;

  function automatic w_t sat(input w_t a);
    if (a > w_t'(SAT))       return w_t'(SAT);
    else if (a < -w_t'(SAT)) return -w_t'(SAT);
    else                     return a;
  endfunction

  assign v1 = w_t'(vdes) - w_t'(vact);
  assign v2 = sat(v1 + v2p);
  assign v3 = sat(v2p + v3p);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v2p <= '0; v3p <= '0; vref <= '0; vld <= 1'b0;
    end else begin
      vld <= upd;
      if (upd) begin
        v2p  <= v2;
        v3p  <= v3;
        vref <= v2 + v3 + w_t'(vdes);
      end
    end
  end
endmodule
