// config_mux: input multiplexer of one time-shared cost datapath.
//
// Three datapaths share the 27 switching configurations: lane L serves
// k = 9L+1 .. 9L+9. After `start` (once per 100 kHz sample, when new ADC words
// are in `adc`) the mux toggles through its 9 slots, one every MUX_DIV clocks
// (50 cycles of 100 MHz = 2 MHz). At the start of each slot it registers the
// operands of configuration k and pulses `en` for one cycle together with them:
//   vk[j] = input voltage connected to output j       (V_{j,k} = S_k V_s)
//   ik[i] = sum of load currents drawn from input i   (I_{i,k} = S_k^T i_L)
//   dv    = {vb - vc, vc - va, va - vb}               (line-to-line, eq. Q)
// `sweep_done` pulses when the ninth slot period has elapsed. The 2 MHz toggle
// and the lane split follow the document; computing the operands from the
// configuration table rather than holding 27 precomputed bundles is this
// design's choice.
module config_mux
  import mc_pkg::*;
#(
  parameter int unsigned LANE    = 0,
  parameter int unsigned MUX_DIV = 50
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [95:0]              adc,      // {V1, V2, V3, I1, I2, I3}
  output logic                     en,
  output logic [3:0]               slot,
  output kidx_t                    k,
  output logic signed [2:0][16:0]  dv,       // dv[0] = vb-vc, dv[1] = vc-va, dv[2] = va-vb
  output logic signed [2:0][17:0]  ik,       // ik[i]: current drawn from input i (a, b, c)
  output logic signed [2:0][15:0]  vk,       // vk[j]: voltage at output j (A, B, C)
  output logic                     busy,
  output logic                     sweep_done
);
  logic [$clog2(MUX_DIV)-1:0] cnt;
  logic [3:0] ph;
  logic signed [15:0] vs [3];
  logic signed [15:0] il [3];
  kidx_t kc;
  conf_t cc;
  logic signed [2:0][17:0] ik_c;
  logic signed [2:0][15:0] vk_c;

  for (genvar i = 0; i < 3; i++) begin : g_unpack
    assign vs[i] = adc[95 - 16*i -: 16];
    assign il[i] = adc[47 - 16*i -: 16];
  end

  assign kc = kidx_t'(LANE * NSLOT + 1) + kidx_t'(ph);
  assign cc = conf_of(kc);

  always_comb begin
    ik_c = '0;
    for (int j = 0; j < 3; j++) begin
      vk_c[j] = vs[phase_num(out_phase(cc, j))];
      for (int i = 0; i < 3; i++)
        if (phase_num(out_phase(cc, j)) == 2'(i))
          ik_c[i] = 18'($signed(ik_c[i]) + 18'(il[j]));
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0; cnt <= '0; ph <= '0; en <= 1'b0; sweep_done <= 1'b0;
      slot <= '0; k <= '0; dv <= '0; ik <= '0; vk <= '0;
    end else begin
      en <= 1'b0;
      sweep_done <= 1'b0;
      if (start) begin
        busy <= 1'b1; cnt <= '0; ph <= '0;
      end else if (busy) begin
        if (cnt == '0) begin
          en   <= 1'b1;
          slot <= ph;
          k    <= kc;
          dv[0] <= 17'(vs[1]) - 17'(vs[2]);
          dv[1] <= 17'(vs[2]) - 17'(vs[0]);
          dv[2] <= 17'(vs[0]) - 17'(vs[1]);
          ik <= ik_c;
          vk <= vk_c;
        end
        if (cnt == $bits(cnt)'(MUX_DIV - 1)) begin
          cnt <= '0;
          if (ph == 4'(NSLOT - 1)) begin
            busy <= 1'b0;
            sweep_done <= 1'b1;
          end else begin
            ph <= ph + 1'b1;
          end
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
