// Changes the target phase repeatedly with both current directions and
// checks, every cycle, that no two inputs are shorted (a forward MOSFET on
// in one switch and a reverse one in another) and that the load current
// always has a path; checks the four steps and their spacing.
module tb_output_driver;
  import mc_pkg::*;
  localparam int STEP = 4;
  logic clk = 0, rst_n = 0, i_neg = 0;
  phase_t target = PH_A;
  logic [5:0] gate;
  logic commuting, commutation_done;
  `include "tb_check.svh"
  `TB_VARS
  always #5 clk = ~clk;
  `WATCHDOG(20000)
  output_driver #(.STEP_CYCLES(STEP)) dut (.*);

  // safety invariants
  always @(negedge clk) if (rst_n) begin
    automatic logic short_c = 1'b0;
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++)
      if (i != j && gate[2*i] && gate[2*j+1]) short_c = 1'b1;
    `CHECK(!short_c, $sformatf("inputs shorted, gate=%b", gate))
    `CHECK(i_neg ? (gate[1] | gate[3] | gate[5]) : (gate[0] | gate[2] | gate[4]), $sformatf("load open, gate=%b", gate))
  end

  initial begin
    automatic int cur = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    `CHECK(gate == 6'b000011, "reset: input a fully on")
    for (int n = 0; n < 40; n++) begin
      automatic int nx = (cur + 1 + $urandom_range(0, 1)) % 3;
      logic [5:0] g0;
      automatic logic neg = 1'($urandom);
      automatic int cb = neg ? 1 : 0;       // conducting MOSFET of a pair
      i_neg <= neg;
      target <= phase_t'(nx + 1);
      g0 = 6'b0; g0[2*cur] = 1; g0[2*cur+1] = 1;
      @(posedge clk); #1;           // step 1 visible
      g0[2*cur + 1 - cb] = 0;
      `CHECK(gate == g0, $sformatf("step 1 gate=%b", gate))
      repeat (STEP) @(posedge clk); #1;
      g0[2*nx + cb] = 1;
      `CHECK(gate == g0, $sformatf("step 2 gate=%b", gate))
      repeat (STEP) @(posedge clk); #1;
      g0[2*cur + cb] = 0;
      `CHECK(gate == g0, $sformatf("step 3 gate=%b", gate))
      repeat (STEP) @(posedge clk); #1;
      g0[2*nx + 1 - cb] = 1;
      `CHECK(gate == g0, $sformatf("step 4 gate=%b", gate))
      repeat (STEP) @(posedge clk); #1;
      `CHECK(commutation_done && !commuting, "commutation finished")
      cur = nx;
      repeat (3) @(posedge clk);
      `CHECK(!commuting, "idle while target unchanged")
    end
    `TB_DONE
  end
endmodule
