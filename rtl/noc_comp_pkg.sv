// noc_comp_pkg -- shared types and constants of the compressing network interface.
//
// A cache line is 16 bytes, carried as four 32-bit words B0..B3 (B0 in bits 31:0).
// The network moves 32-bit flits; a data packet is one header flit followed by
// up to four body flits. The 3-bit encodings, their priorities and the packet sizes
// follow the design description:
//   Zero 000 (1 flit), Repeat 001 (2), B4D1 010 (3), B4D2 011 (4), None 111 (5).
// The layout of the header flit is this design's own choice (the description only
// says that the header carries addresses, size and the compression encoding):
//   [31:29] encoding   [28:26] delta sign bits (bit 26 = delta of B1)
//   [25:24] message type [23:19] destination node [18:14] source node
//   [13:0]  line address
package noc_comp_pkg;

  localparam int unsigned FLIT_W     = 32;  // flit length 4 bytes
  localparam int unsigned WORD_W     = 32;  // base size 4 bytes
  localparam int unsigned LINE_WORDS = 4;   // 16-byte cache line
  localparam int unsigned LINE_W     = WORD_W * LINE_WORDS;
  localparam int unsigned NDELTA     = LINE_WORDS - 1;  // N-1 subtractors
  localparam int unsigned MAX_FLITS  = 5;   // header + 4 body flits
  localparam int unsigned MESH_DIM   = 4;   // 4x4 2D mesh
  localparam int unsigned COORD_W    = 2;
  // Node number {mc, y[1:0], x[1:0]}: mc=1 names the memory controller hung on the
  // outer edge port of corner router (x, y).
  localparam int unsigned NODE_W     = 1 + 2 * COORD_W;
  localparam int unsigned ADDR_W     = 14;
  // Router port numbers
  localparam int unsigned NPORTS = 5;
  localparam int unsigned P_LOCAL = 0, P_NORTH = 1, P_EAST = 2, P_SOUTH = 3, P_WEST = 4;

  typedef logic [WORD_W-1:0] word_t;
  typedef word_t [LINE_WORDS-1:0] line_t;   // line[0] = B0

  typedef enum logic [2:0] {
    ENC_ZERO = 3'b000,
    ENC_REP  = 3'b001,
    ENC_B4D1 = 3'b010,
    ENC_B4D2 = 3'b011,
    ENC_NONE = 3'b111
  } enc_t;

  typedef enum logic [1:0] {
    MSG_RD_REQ   = 2'b00,  // header only
    MSG_WR_REPLY = 2'b01,  // header only
    MSG_WR_REQ   = 2'b10,  // header + data
    MSG_RD_REPLY = 2'b11   // header + data
  } msg_t;

  typedef struct packed {
    enc_t               enc;
    logic [NDELTA-1:0]  sign;
    msg_t               msg;
    logic [NODE_W-1:0]  dst;
    logic [NODE_W-1:0]  src;
    logic [ADDR_W-1:0]  addr;
  } header_t;

  typedef struct packed {
    logic              head;
    logic              tail;
    logic [FLIT_W-1:0] data;
  } flit_t;

  // Body bytes packed after the header: byte 0 = bits 7:0 of the first body flit.
  typedef logic [LINE_W-1:0] body_t;

  function automatic logic msg_has_data(msg_t m);
    return (m == MSG_WR_REQ) || (m == MSG_RD_REPLY);
  endfunction

  // Body length in bytes for each encoding (packet size minus the 4-byte header).
  function automatic int unsigned body_bytes(enc_t e);
    case (e)
      ENC_ZERO: return 0;
      ENC_REP:  return 4;
      ENC_B4D1: return 4 + NDELTA * 1;
      ENC_B4D2: return 4 + NDELTA * 2;
      default:  return 16;
    endcase
  endfunction

  // Number of flits in a packet: header plus body rounded up to whole flits.
  function automatic logic [2:0] packet_flits(enc_t e, logic has_data);
    int unsigned b;
    if (!has_data) return 3'd1;
    b = body_bytes(e);
    return 3'(1 + (b + 3) / 4);
  endfunction

endpackage
