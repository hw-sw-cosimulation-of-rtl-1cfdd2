// Compares the sinc^3 decimator with a direct convolution by the triangular
// cubic-box impulse response, for constant and random bitstreams.
module tb_sinc3_decimator;
  localparam int R = 200;
  logic clk = 0, rst_n = 0, ce = 0, bit_in = 0, dec_tick = 0;
  logic signed [15:0] dout;
  `include "tb_check.svh"
  `TB_VARS
  always #5 clk = ~clk;
  `WATCHDOG(200000)

  sinc3_decimator #(.R(R)) dut (.*);

  longint h [3*R-2];
  int x [$];          // history, newest at the back
  int n = 0;
  int delay = -1;

  function automatic longint conv(input int d);
    longint y = 0;
    for (int i = 0; i < 3*R-2; i++)
      if (x.size() - 1 - d - i >= 0) y += h[i] * x[x.size() - 1 - d - i];
    return y;
  endfunction

  initial begin
    longint h2 [2*R-1];
    for (int i = 0; i < 2*R-1; i++) begin h2[i] = 0; for (int j = 0; j < R; j++) if (i-j >= 0 && i-j < R) h2[i]++; end
    for (int i = 0; i < 3*R-2; i++) begin h[i] = 0; for (int j = 0; j < R; j++) if (i-j >= 0 && i-j < 2*R-1) h[i] += h2[i-j]; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < R*30; t++) begin
      logic b;
      if (t < R*8)       b = 1'b1;
      else if (t < R*16) b = 1'b0;
      else               b = 1'($urandom);
      ce <= 1; bit_in <= b; dec_tick <= ((t % R) == R-1);
      @(posedge clk);
      x.push_back(b ? 1 : -1);
      if ((t % R) == R-1) begin
        ce <= 0; dec_tick <= 0;
        @(posedge clk); #1;
        n++;
        if (n == 6) `CHECK(dout == 16'sd31250, "full-scale ones give +31250")
        if (n == 14) `CHECK(dout == -16'sd31250, "full-scale zeros give -31250")
        if (n >= 20) begin
          if (delay < 0) begin
            for (int d = 0; d < 4; d++) if (16'(conv(d) >>> 8) == dout) delay = d;
            `CHECK(delay >= 0, "output matches the convolution at some fixed delay")
          end else begin
            `CHECK(16'(conv(delay) >>> 8) == dout, $sformatf("decimated output %0d vs %0d", dout, conv(delay) >>> 8))
          end
        end
      end
    end
    `TB_DONE
  end
endmodule
