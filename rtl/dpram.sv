// dpram: dual-port 32-bit RAM holding the operation log.
//
// Port B is the write-only port of the memory writer; port A is the
// read/write port of the RAM controller, with a registered read (data one
// cycle after `a_en`). Both ports share one clock here. If both write the
// same word in one cycle, port B wins. DEPTH is this design's choice.
module dpram #(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic           clk,
  input  logic           a_en,
  input  logic           a_we,
  input  logic [AW-1:0]  a_addr,
  input  logic [31:0]    a_wdata,
  output logic [31:0]    a_rdata,
  input  logic           b_we,
  input  logic [AW-1:0]  b_addr,
  input  logic [31:0]    b_wdata
);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en && a_we) mem[a_addr] <= a_wdata;
    if (b_we)         mem[b_addr] <= b_wdata;
    if (a_en)         a_rdata <= mem[a_addr];
  end
endmodule
