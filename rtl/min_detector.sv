// min_detector: the multilevel quantiser, picks the configuration of least
// cost.
//
// A knock-out tournament over the N = 27 costs: each stage compares pairs
// and keeps the smaller (the odd one out passes unchanged), 27 -> 14 -> 7 ->
// 4 -> 2 -> 1, one register stage per round, so the winner appears 5 cycles
// after `start` with `vld`. Costs are non-negative float32 values and are
// compared as unsigned integers, which orders them correctly; on a tie the
// lower index wins. `k` is the winning configuration index 1..27. The
// tournament and its 5-cycle latency follow the document; the tie rule is
// this design's choice.
module min_detector
  import mc_pkg::*;
#(
  parameter int unsigned N = 27
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [N-1:0][31:0]   cost,      // cost[i] belongs to k = i + 1
  output kidx_t                k,
  output logic [31:0]          min_cost,
  output logic                 vld
);
  localparam int unsigned NS = $clog2(N);  // rounds

  function automatic int unsigned size_at(input int unsigned s);
    int unsigned n = N;
    for (int unsigned i = 0; i < s; i++) n = (n + 1) / 2;
    return n;
  endfunction

  logic [31:0] c   [NS+1][N];    // c[0]: inputs, c[s]: after round s
  kidx_t       idx [NS+1][N];
  logic [31:0] cr  [NS][N];      // round registers
  kidx_t       ir  [NS][N];
  logic [NS-1:0] v;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      c[0][i]   = cost[i];
      idx[0][i] = kidx_t'(i + 1);
    end
    for (int s = 0; s < NS; s++)
      for (int i = 0; i < N; i++) begin
        c[s+1][i]   = cr[s][i];
        idx[s+1][i] = ir[s][i];
      end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v <= '0;
      for (int s = 0; s < NS; s++)
        for (int i = 0; i < N; i++) begin cr[s][i] <= '0; ir[s][i] <= '0; end
    end else begin
      v <= {v[NS-2:0], start};
      for (int s = 0; s < NS; s++)
        for (int i = 0; i < N; i++)
          if (i < int'(size_at(s + 1))) begin
            if (2*i + 1 < int'(size_at(s)) && c[s][(2*i+1) % N] < c[s][2*i % N]) begin
              cr[s][i] <= c[s][(2*i+1) % N]; ir[s][i] <= idx[s][(2*i+1) % N];
            end else begin
              cr[s][i] <= c[s][2*i % N];     ir[s][i] <= idx[s][2*i % N];
            end
          end else begin
            cr[s][i] <= '0; ir[s][i] <= '0;
          end
    end
  end

  assign k        = idx[NS][0];
  assign min_cost = c[NS][0];
  assign vld      = v[NS-1];
endmodule
