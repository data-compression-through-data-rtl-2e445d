// noc_compress_top -- 4x4 mesh NoC whose network interfaces compress cache lines.
//
// Twenty network interfaces hang on a 4x4 mesh (mesh_noc): one per tile (endpoints
// 0..15, node number 4*y + x, where the core/L1/L2 of the tile attach) and one per
// corner memory controller (endpoints 16..19, node number {1'b1, y, x} of the corner).
// Each interface has an injection half (ni_tx) that delta-encodes the line of a write
// request or read reply before it enters the network, and an ejection half (ni_rx)
// that decodes it before handing the message back. Caches, cores and memory
// controllers are outside this module: their side of each interface is brought out
// as a request port (req_*) and a delivery port (msg_*), both valid/ready.
// Timing: a request accepted at an endpoint reaches its destination's msg_* port
// after the packet has been stored and forwarded by every router on its XY path; a
// compressed packet has fewer flits and so spends fewer cycles on every hop.
// The system organisation follows the design description; the endpoint numbering and
// the port bundles are this design's own choice.
module noc_compress_top
  import noc_comp_pkg::*;
#(
  parameter int unsigned BUF_DEPTH   = 8,
  parameter int unsigned PIPE_STAGES = 5,
  localparam int unsigned NT = MESH_DIM * MESH_DIM,
  localparam int unsigned NE = NT + 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NE-1:0]     req_valid_i,
  output logic [NE-1:0]     req_ready_o,
  input  msg_t              req_msg_i  [NE],
  input  logic [NODE_W-1:0] req_dst_i  [NE],
  input  logic [ADDR_W-1:0] req_addr_i [NE],
  input  line_t             req_line_i [NE],
  output logic [NE-1:0]     msg_valid_o,
  input  logic [NE-1:0]     msg_ready_i,
  output header_t           msg_hdr_o  [NE],
  output line_t             msg_line_o [NE]
);

  logic [NE-1:0] inj_valid, inj_ready, ej_valid, ej_ready;
  flit_t         inj_flit [NE];
  flit_t         ej_flit  [NE];

  function automatic logic [NODE_W-1:0] node_of(int unsigned e);
    int unsigned k;
    if (e < NT) return NODE_W'(e);
    k = e - NT;
    // corners 0: x0y0, 1: x3y0, 2: x0y3, 3: x3y3
    return {1'b1, COORD_W'((k >= 2) ? MESH_DIM - 1 : 0), COORD_W'((k % 2 == 1) ? MESH_DIM - 1 : 0)};
  endfunction

  for (genvar e = 0; e < NE; e++) begin : g_ni
    ni_tx #(.NODE_ID(node_of(e))) u_tx (
      .clk, .rst_n,
      .req_valid_i(req_valid_i[e]), .req_ready_o(req_ready_o[e]),
      .req_msg_i(req_msg_i[e]), .req_dst_i(req_dst_i[e]), .req_addr_i(req_addr_i[e]),
      .req_line_i(req_line_i[e]),
      .flit_valid_o(inj_valid[e]), .flit_ready_i(inj_ready[e]), .flit_o(inj_flit[e])
    );
    ni_rx u_rx (
      .clk, .rst_n,
      .flit_valid_i(ej_valid[e]), .flit_ready_o(ej_ready[e]), .flit_i(ej_flit[e]),
      .msg_valid_o(msg_valid_o[e]), .msg_ready_i(msg_ready_i[e]),
      .msg_hdr_o(msg_hdr_o[e]), .msg_line_o(msg_line_o[e])
    );
  end

  mesh_noc #(.BUF_DEPTH(BUF_DEPTH), .PIPE_STAGES(PIPE_STAGES)) u_mesh (
    .clk, .rst_n,
    .local_in_valid_i (inj_valid[NT-1:0]),  .local_in_ready_o (inj_ready[NT-1:0]),
    .local_in_flit_i  (inj_flit[0:NT-1]),
    .local_out_valid_o(ej_valid[NT-1:0]),   .local_out_ready_i(ej_ready[NT-1:0]),
    .local_out_flit_o (ej_flit[0:NT-1]),
    .mc_in_valid_i    (inj_valid[NE-1:NT]), .mc_in_ready_o    (inj_ready[NE-1:NT]),
    .mc_in_flit_i     (inj_flit[NT:NE-1]),
    .mc_out_valid_o   (ej_valid[NE-1:NT]),  .mc_out_ready_i   (ej_ready[NE-1:NT]),
    .mc_out_flit_o    (ej_flit[NT:NE-1])
  );

endmodule
