// output_driver: gate control for the three bidirectional switches that feed
// one output phase.
//
// Each bidirectional switch (one per input phase a, b, c) is a pair of
// MOSFETs in anti-series: the "forward" one carries current from the input
// to the load, the "reverse" one from the load to the input. In steady state
// both MOSFETs of the selected switch are on. When `target` (the phase code
// chosen by the minimum detector) differs from the connected phase, the
// driver changes over with the four-step, output-current-direction-based
// sequence, taking the direction from the sign of the load-current word
// (`i_neg` = 1: current flows from the load into the converter):
//   1. old switch: turn off the MOSFET that is not conducting
//   2. new switch: turn on the MOSFET that carries the load current
//   3. old switch: turn off its other MOSFET
//   4. new switch: turn on its other MOSFET
// so the inputs are never shorted and the load is never left open. Step 1 is
// applied one cycle after the change is seen, each later step STEP_CYCLES
// after the previous one; a target that changes during a commutation is
// taken up once it ends. After reset output is connected to input a.
// `gate[2*i]` is the forward and `gate[2*i+1]` the reverse MOSFET of input i.
// The sequence follows the document; the step time and reset state are this
// design's choices.
module output_driver
  import mc_pkg::*;
#(
  parameter int unsigned STEP_CYCLES = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  phase_t      target,
  input  logic        i_neg,
  output logic [5:0]  gate,
  output logic        commuting,
  output logic        commutation_done
);
  typedef enum logic [2:0] {IDLE, ST1, ST2, ST3, ST4} state_t;

  state_t st;
  logic [1:0] cur, nxt;           // input number 0..2
  logic neg;                      // latched current direction
  logic [$clog2(STEP_CYCLES+1)-1:0] tmr;
  logic [1:0] tgt_n;
  logic cond_bit, other_bit;      // index in the pair: 0 forward, 1 reverse
  logic idle_bit;                 // non-conducting MOSFET for the current now

  assign tgt_n     = phase_num(target);
  assign cond_bit  = neg;         // positive current: forward conducts
  assign other_bit = ~neg;
  assign idle_bit  = ~i_neg;
  assign commuting = (st != IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= IDLE; cur <= 2'd0; nxt <= 2'd0; neg <= 1'b0; tmr <= '0;
      gate <= 6'b000011; commutation_done <= 1'b0;
    end else begin
      commutation_done <= 1'b0;
      if (tmr != '0) tmr <= tmr - 1'b1;
      case (st)
        IDLE: if (target != 2'b00 && tgt_n != cur) begin
          nxt <= tgt_n; neg <= i_neg;
          gate[2*cur + 32'(idle_bit)] <= 1'b0;             // step 1
          st  <= ST1; tmr <= $bits(tmr)'(STEP_CYCLES - 1);
        end
        ST1: if (tmr == '0) begin
          gate[2*nxt + 32'(cond_bit)] <= 1'b1;          // step 2
          st <= ST2; tmr <= $bits(tmr)'(STEP_CYCLES - 1);
        end
        ST2: if (tmr == '0) begin
          gate[2*cur + 32'(cond_bit)] <= 1'b0;          // step 3
          st <= ST3; tmr <= $bits(tmr)'(STEP_CYCLES - 1);
        end
        ST3: if (tmr == '0) begin
          gate[2*nxt + 32'(other_bit)] <= 1'b1;         // step 4
          st <= ST4; tmr <= $bits(tmr)'(STEP_CYCLES - 1);
        end
        ST4: if (tmr == '0) begin
          cur <= nxt; st <= IDLE; commutation_done <= 1'b1;
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
