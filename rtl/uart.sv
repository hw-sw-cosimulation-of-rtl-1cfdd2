// uart: AXI4-Lite serial port for the command-line link to the host.
//
// 8 data bits, no parity, one stop bit, LSB first; CLKS_PER_BIT clocks per
// bit (10 -> 10 MBd at 100 MHz, 12 MBd at 120 MHz). Transmit and receive
// each have a FIFO of FIFO_DEPTH bytes.
// Registers (offsets within the block):
//   0x0 data     write: queue a byte for transmission
//                read:  {23'b0, valid, byte}; pops the oldest received byte
//   0x4 control  read:  {28'b0, tx_full, tx_empty, rx_half, rx_avail}
//                write: bits [2:0] enable the interrupt on rx_avail,
//                       rx_half (at least half full), tx_empty
// `irq` is the OR of the enabled FIFO conditions. The receiver samples each
// bit in its middle after a falling edge on the synchronised `rx`; a frame
// whose stop bit is 0 is dropped. The role and the speed target follow the
// document; framing, FIFOs and register layout are this design's choices.
module uart
  import mc_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 10,
  parameter int unsigned FIFO_DEPTH   = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  axil_req_t  s_axi_req,
  output axil_rsp_t  s_axi_rsp,
  input  logic       rx,
  output logic       tx,
  output logic       irq
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);
  localparam int unsigned FW = $clog2(FIFO_DEPTH) + 1;

  logic wr, rd;
  logic [31:0] waddr, raddr, wdata, rdata;
  logic [3:0] wstrb;
  logic [2:0] irq_en;

  axil_slave_port #(.RD_LAT(0)) u_port (
    .clk, .rst_n, .req(s_axi_req), .rsp(s_axi_rsp),
    .wr, .waddr, .wdata, .wstrb, .rd, .raddr, .rdata
  );

  // FIFOs
  logic [7:0] txf_dout, rxf_dout, rx_byte;
  logic txf_empty, txf_full, rxf_empty, rxf_full, txf_pop, rxf_push;
  logic [FW-1:0] txf_cnt, rxf_cnt;
  logic rx_half;

  sync_fifo #(.W(8), .DEPTH(FIFO_DEPTH)) u_txf (
    .clk, .rst_n, .push(wr && waddr[2] == 1'b0), .din(wdata[7:0]),
    .pop(txf_pop), .dout(txf_dout), .empty(txf_empty), .full(txf_full), .count(txf_cnt));
  sync_fifo #(.W(8), .DEPTH(FIFO_DEPTH)) u_rxf (
    .clk, .rst_n, .push(rxf_push), .din(rx_byte),
    .pop(rd && raddr[2] == 1'b0), .dout(rxf_dout), .empty(rxf_empty), .full(rxf_full), .count(rxf_cnt));

  assign rx_half = rxf_cnt >= FW'(FIFO_DEPTH / 2);

  always_comb begin
    if (raddr[2] == 1'b0) rdata = {23'b0, !rxf_empty, rxf_dout};
    else                  rdata = {28'b0, txf_full, txf_empty, rx_half, !rxf_empty};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      irq_en <= '0; irq <= 1'b0;
    end else begin
      if (wr && waddr[2] == 1'b1) irq_en <= wdata[2:0];
      irq <= |(irq_en & {txf_empty, rx_half, !rxf_empty});
    end
  end

  // transmitter
  logic [9:0] tx_sh;
  logic [3:0] tx_bits;
  logic [CW-1:0] tx_cnt;

  assign txf_pop = (tx_bits == 4'd0) && !txf_empty;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tx_sh <= '1; tx_bits <= '0; tx_cnt <= '0; tx <= 1'b1;
    end else if (tx_bits == 4'd0) begin
      tx <= 1'b1;
      if (!txf_empty) begin
        tx_sh <= {1'b1, txf_dout, 1'b0};
        tx_bits <= 4'd10; tx_cnt <= '0;
      end
    end else begin
      tx <= tx_sh[0];
      if (tx_cnt == CW'(CLKS_PER_BIT - 1)) begin
        tx_cnt <= '0; tx_sh <= {1'b1, tx_sh[9:1]}; tx_bits <= tx_bits - 1'b1;
      end else begin
        tx_cnt <= tx_cnt + 1'b1;
      end
    end
  end

  // receiver
  logic [1:0] rx_sync;
  logic [3:0] rx_bits;
  logic [CW-1:0] rx_cnt;
  logic [8:0] rx_sh;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_sync <= 2'b11; rx_bits <= '0; rx_cnt <= '0; rx_sh <= '0; rx_byte <= '0; rxf_push <= 1'b0;
    end else begin
      rx_sync  <= {rx_sync[0], rx};
      rxf_push <= 1'b0;
      if (rx_bits == 4'd0) begin
        if (!rx_sync[1]) begin                        // start bit seen
          rx_bits <= 4'd10; rx_cnt <= CW'(CLKS_PER_BIT / 2);
        end
      end else if (rx_cnt == CW'(CLKS_PER_BIT - 1)) begin
        rx_cnt  <= '0;
        rx_bits <= rx_bits - 1'b1;
        if (rx_bits == 4'd10) begin
          if (rx_sync[1]) rx_bits <= 4'd0;            // false start
        end else begin
          rx_sh <= {rx_sync[1], rx_sh[8:1]};
          if (rx_bits == 4'd1 && rx_sync[1]) begin   // stop bit
            rx_byte <= rx_sh[8:1]; rxf_push <= !rxf_full;
          end
        end
      end else begin
        rx_cnt <= rx_cnt + 1'b1;
      end
    end
  end
endmodule
