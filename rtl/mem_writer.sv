// mem_writer: writes the 128-bit log records into the DPRAM.
//
// A record offered with `pkt_vld` is latched and written as four 32-bit
// words, bits [127:96] first, at four successive `ce` (20 MHz) enables, so a
// write takes 4 slow cycles. `ptr` is the next word address.
//   mode = 0, "COCO" (continuous conversion): the address wraps around;
//     `evt_half` pulses when the word at DEPTH/2-1 is written and `evt_full`
//     when the word at DEPTH-1 is written, so the CPU can read the half that
//     is not being overwritten.
//   mode = 1, "Snapshot": writing starts at address 0 after `rearm` and stops
//     after the word at DEPTH-1; `evt_snap` pulses then and `snap_done` stays
//     high until the next `rearm`.
// Records arrive only while `enable` is high; one arriving while a write is
// in progress is dropped (at 100 kHz records there is ample time). The modes
// and the 4-cycle write follow the document; DEPTH and the event points are
// this design's choices.
module mem_writer #(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           ce,
  input  logic           enable,
  input  logic           mode,
  input  logic           rearm,
  input  logic           pkt_vld,
  input  logic [127:0]   pkt,
  output logic           we,
  output logic [AW-1:0]  waddr,
  output logic [31:0]    wdata,
  output logic [AW-1:0]  ptr,
  output logic           busy,
  output logic           snap_done,
  output logic           evt_half,
  output logic           evt_full,
  output logic           evt_snap
);
  logic [127:0] buf_q;
  logic [1:0]   wcnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      buf_q <= '0; wcnt <= '0; busy <= 1'b0; ptr <= '0; snap_done <= 1'b0;
      we <= 1'b0; waddr <= '0; wdata <= '0;
      evt_half <= 1'b0; evt_full <= 1'b0; evt_snap <= 1'b0;
    end else begin
      we <= 1'b0; evt_half <= 1'b0; evt_full <= 1'b0; evt_snap <= 1'b0;
      if (rearm) begin
        ptr <= '0; snap_done <= 1'b0;
      end
      if (pkt_vld && enable && !busy && !(mode && snap_done) && !rearm) begin
        buf_q <= pkt; busy <= 1'b1; wcnt <= '0;
      end else if (busy && ce) begin
        we    <= 1'b1;
        waddr <= ptr;
        wdata <= buf_q[127:96];
        buf_q <= {buf_q[95:0], 32'b0};
        wcnt  <= wcnt + 1'b1;
        ptr   <= ptr + 1'b1;
        if (ptr == AW'(DEPTH/2 - 1) && !mode) evt_half <= 1'b1;
        if (ptr == AW'(DEPTH - 1)) begin
          if (mode) begin
            evt_snap <= 1'b1; snap_done <= 1'b1; busy <= 1'b0;
          end else begin
            evt_full <= 1'b1;
          end
        end
        if (wcnt == 2'd3) busy <= 1'b0;
      end
    end
  end
endmodule
