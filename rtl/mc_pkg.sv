// mc_pkg: types and constants shared by the matrix-converter controller.
//
// The converter has 3 input phases (a, b, c) and 3 output phases (A, B, C).
// A switching configuration connects every output phase to exactly one input
// phase, so there are 27 of them. Configuration k (1..27) is stored as three
// 2-bit phase codes, output A in bits [5:4], B in [3:2], C in [1:0], with the
// code a = 2'b01, b = 2'b10, c = 2'b11 (2'b00 never occurs). The ordering
// follows the classical matrix-converter table: k = 1..18 are the pairs
// +1,-1,+2,-2,...,+9,-9, k = 19..21 the three zero states (aaa, bbb, ccc) and
// k = 22..27 the six rotating states (abc, acb, bac, bca, cab, cba).
//
// The package also holds the AXI4-Lite request/response structs used on all
// register ports, and a few float32 field helpers.
package mc_pkg;

  typedef logic [1:0] phase_t;          // 01 = a, 10 = b, 11 = c
  typedef logic [5:0] conf_t;           // {A, B, C}
  typedef logic [4:0] kidx_t;           // configuration index 1..27

  localparam int unsigned NCONF  = 27;
  localparam int unsigned NLANE  = 3;
  localparam int unsigned NSLOT  = 9;

  localparam phase_t PH_A = 2'b01;
  localparam phase_t PH_B = 2'b10;
  localparam phase_t PH_C = 2'b11;

  // Configuration table, index 1..27 (entry 0 unused, returns 0).
  function automatic conf_t conf_of(input kidx_t k);
    case (k)
      5'd1 : return {PH_A, PH_B, PH_B};  // +1
      5'd2 : return {PH_B, PH_A, PH_A};  // -1
      5'd3 : return {PH_B, PH_C, PH_C};  // +2
      5'd4 : return {PH_C, PH_B, PH_B};  // -2
      5'd5 : return {PH_C, PH_A, PH_A};  // +3
      5'd6 : return {PH_A, PH_C, PH_C};  // -3
      5'd7 : return {PH_B, PH_A, PH_B};  // +4
      5'd8 : return {PH_A, PH_B, PH_A};  // -4
      5'd9 : return {PH_C, PH_B, PH_C};  // +5
      5'd10: return {PH_B, PH_C, PH_B};  // -5
      5'd11: return {PH_A, PH_C, PH_A};  // +6
      5'd12: return {PH_C, PH_A, PH_C};  // -6
      5'd13: return {PH_B, PH_B, PH_A};  // +7
      5'd14: return {PH_A, PH_A, PH_B};  // -7
      5'd15: return {PH_C, PH_C, PH_B};  // +8
      5'd16: return {PH_B, PH_B, PH_C};  // -8
      5'd17: return {PH_A, PH_A, PH_C};  // +9
      5'd18: return {PH_C, PH_C, PH_A};  // -9
      5'd19: return {PH_A, PH_A, PH_A};  // zero a
      5'd20: return {PH_B, PH_B, PH_B};  // zero b
      5'd21: return {PH_C, PH_C, PH_C};  // zero c
      5'd22: return {PH_A, PH_B, PH_C};
      5'd23: return {PH_A, PH_C, PH_B};
      5'd24: return {PH_B, PH_A, PH_C};
      5'd25: return {PH_B, PH_C, PH_A};
      5'd26: return {PH_C, PH_A, PH_B};
      5'd27: return {PH_C, PH_B, PH_A};
      default: return '0;
    endcase
  endfunction

  // Input-phase number 0..2 of a phase code (a -> 0, b -> 1, c -> 2).
  function automatic logic [1:0] phase_num(input phase_t p);
    return p - 2'd1;
  endfunction

  // Phase code driving output j (0 = A, 1 = B, 2 = C) in configuration c.
  function automatic phase_t out_phase(input conf_t c, input int unsigned j);
    return c[5-2*j -: 2];
  endfunction

  // IEEE-754 single precision
  typedef struct packed {
    logic       s;
    logic [7:0] e;
    logic [22:0] m;
  } f32_t;

  // AXI4-Lite, 32-bit address and data. Protection signals are not used.
  typedef struct packed {
    logic        awvalid;
    logic [31:0] awaddr;
    logic        wvalid;
    logic [31:0] wdata;
    logic [3:0]  wstrb;
    logic        bready;
    logic        arvalid;
    logic [31:0] araddr;
    logic        rready;
  } axil_req_t;

  typedef struct packed {
    logic        awready;
    logic        wready;
    logic        bvalid;
    logic [1:0]  bresp;
    logic        arready;
    logic        rvalid;
    logic [31:0] rdata;
    logic [1:0]  rresp;
  } axil_rsp_t;

  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_DECERR = 2'b11;

endpackage
