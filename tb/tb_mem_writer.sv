// Memory writer with DEPTH = 32: records are written as four words on four
// enables; COCO mode wraps and signals half and full; Snapshot mode stops
// at the end, signals once and restarts after rearm.
module tb_mem_writer;
  localparam int DEPTH = 32;
  logic clk = 0, rst_n = 0, ce = 0, enable = 1, mode = 0, rearm = 0, pkt_vld = 0;
  logic [127:0] pkt;
  logic we, busy, snap_done, evt_half, evt_full, evt_snap;
  logic [4:0] waddr, ptr;
  logic [31:0] wdata;
  `include "tb_check.svh"
  `TB_VARS
  always #5 clk = ~clk;
  `WATCHDOG(100000)
  mem_writer #(.DEPTH(DEPTH)) dut (.*);

  logic [31:0] mem [DEPTH];
  int nhalf = 0, nfull = 0, nsnap = 0, ce_cnt = 0;
  always @(posedge clk) begin
    ce <= (ce_cnt % 5 == 4); ce_cnt <= ce_cnt + 1;
    if (we) mem[waddr] <= wdata;
    if (evt_half) nhalf++;
    if (evt_full) nfull++;
    if (evt_snap) nsnap++;
  end

  task automatic send(input logic [127:0] p, output int cycles);
    pkt <= p; pkt_vld <= 1; @(posedge clk); pkt_vld <= 0;
    cycles = 0;
    do begin @(posedge clk); cycles++; end while (busy && cycles < 100);
    repeat (2) @(posedge clk);
  endtask

  initial begin
    logic [127:0] rec [16];
    int c;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // COCO: 12 records = 48 words, wraps once
    for (int r = 0; r < 12; r++) begin
      rec[r % 8] = {$urandom, $urandom, $urandom, $urandom};
      send(rec[r % 8], c);
      `CHECK(c <= 4 * 5 + 1, "four words within four enables")
      for (int w = 0; w < 4; w++) `CHECK(mem[(4*r + w) % DEPTH] == rec[r % 8][127 - 32*w -: 32], "COCO word")
    end
    `CHECK(nhalf == 2 && nfull == 1, $sformatf("COCO events half=%0d full=%0d", nhalf, nfull))
    `CHECK(ptr == 5'(48 % DEPTH), "pointer wrapped")
    // Snapshot
    mode <= 1; rearm <= 1; @(posedge clk); rearm <= 0; @(posedge clk);
    `CHECK(ptr == 0 && !snap_done, "rearm restarts at 0")
    for (int r = 0; r < 10; r++) begin
      rec[r] = {$urandom, $urandom, $urandom, $urandom};
      send(rec[r], c);
    end
    for (int r = 0; r < 8; r++)
      for (int w = 0; w < 4; w++) `CHECK(mem[4*r + w] == rec[r][127 - 32*w -: 32], "snapshot word")
    `CHECK(nsnap == 1 && snap_done, "snapshot completes once")
    `CHECK(nhalf == 2 && nfull == 1, "no COCO events in snapshot mode")
    `CHECK(mem[0] == rec[0][127:96], "no overwrite after the snapshot is full")
    rearm <= 1; @(posedge clk); rearm <= 0; @(posedge clk);
    send(rec[9], c);
    `CHECK(mem[0] == rec[9][127:96] && ptr == 5'd4, "rearm starts a new snapshot")
    enable <= 0;
    send(rec[1], c);
    `CHECK(ptr == 5'd4, "disabled: nothing written")
    `TB_DONE
  end
endmodule
