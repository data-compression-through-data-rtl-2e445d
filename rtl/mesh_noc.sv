// mesh_noc -- 4x4 2D mesh of mesh_router instances.
//
// Router (x, y) is node n = 4*y + x. East/West links join neighbouring columns,
// North/South links neighbouring rows (North = increasing y). Each router's Local
// port is brought out as local_*[n], where a network interface attaches. The four
// memory controllers sit at the corners: corner k (0: x0y0, 1: x3y0, 2: x0y3,
// 3: x3y3) uses the otherwise unused outer West (column 0) or East (column 3) port
// of its corner router, brought out as mc_*[k]. Other outer ports are tied off.
// All links are valid/ready flit channels; the mesh adds no logic beyond the routers.
// The 4x4 size, the corner controllers and the mesh topology follow the design
// description; where a controller plugs into its corner router is this design's
// choice.
module mesh_noc
  import noc_comp_pkg::*;
#(
  parameter int unsigned BUF_DEPTH   = 8,
  parameter int unsigned PIPE_STAGES = 5
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [MESH_DIM*MESH_DIM-1:0]  local_in_valid_i,
  output logic [MESH_DIM*MESH_DIM-1:0]  local_in_ready_o,
  input  flit_t                         local_in_flit_i  [MESH_DIM*MESH_DIM],
  output logic [MESH_DIM*MESH_DIM-1:0]  local_out_valid_o,
  input  logic [MESH_DIM*MESH_DIM-1:0]  local_out_ready_i,
  output flit_t                         local_out_flit_o [MESH_DIM*MESH_DIM],
  input  logic [3:0]                    mc_in_valid_i,
  output logic [3:0]                    mc_in_ready_o,
  input  flit_t                         mc_in_flit_i  [4],
  output logic [3:0]                    mc_out_valid_o,
  input  logic [3:0]                    mc_out_ready_i,
  output flit_t                         mc_out_flit_o [4]
);

  localparam int unsigned D  = MESH_DIM;
  localparam int unsigned NN = D * D;

  logic [NPORTS-1:0] rin_valid  [NN];
  logic [NPORTS-1:0] rin_ready  [NN];
  flit_t             rin_flit   [NN][NPORTS];
  logic [NPORTS-1:0] rout_valid [NN];
  logic [NPORTS-1:0] rout_ready [NN];
  flit_t             rout_flit  [NN][NPORTS];

  for (genvar y = 0; y < D; y++) begin : g_y
    for (genvar x = 0; x < D; x++) begin : g_x
      localparam int unsigned N = y * D + x;
      localparam bit CORNER = (x == 0 || x == D - 1) && (y == 0 || y == D - 1);
      localparam int unsigned K = ((y == D - 1) ? 2 : 0) + ((x == D - 1) ? 1 : 0);

      mesh_router #(
        .X(COORD_W'(x)), .Y(COORD_W'(y)), .BUF_DEPTH(BUF_DEPTH), .PIPE_STAGES(PIPE_STAGES)
      ) u_router (
        .clk, .rst_n,
        .in_valid_i(rin_valid[N]), .in_ready_o(rin_ready[N]), .in_flit_i(rin_flit[N]),
        .out_valid_o(rout_valid[N]), .out_ready_i(rout_ready[N]), .out_flit_o(rout_flit[N])
      );

      // Local port
      assign rin_valid[N][P_LOCAL]  = local_in_valid_i[N];
      assign rin_flit[N][P_LOCAL]   = local_in_flit_i[N];
      assign local_in_ready_o[N]    = rin_ready[N][P_LOCAL];
      assign local_out_valid_o[N]   = rout_valid[N][P_LOCAL];
      assign local_out_flit_o[N]    = rout_flit[N][P_LOCAL];
      assign rout_ready[N][P_LOCAL] = local_out_ready_i[N];

      // East input comes from the West output of the right-hand neighbour
      if (x < D - 1) begin : g_e
        assign rin_valid[N][P_EAST]  = rout_valid[N+1][P_WEST];
        assign rin_flit[N][P_EAST]   = rout_flit[N+1][P_WEST];
        assign rout_ready[N][P_EAST] = rin_ready[N+1][P_WEST];
      end else if (CORNER) begin : g_e_mc
        assign rin_valid[N][P_EAST]  = mc_in_valid_i[K];
        assign rin_flit[N][P_EAST]   = mc_in_flit_i[K];
        assign mc_in_ready_o[K]      = rin_ready[N][P_EAST];
        assign mc_out_valid_o[K]     = rout_valid[N][P_EAST];
        assign mc_out_flit_o[K]      = rout_flit[N][P_EAST];
        assign rout_ready[N][P_EAST] = mc_out_ready_i[K];
      end else begin : g_e_tie
        assign rin_valid[N][P_EAST]  = 1'b0;
        assign rin_flit[N][P_EAST]   = '0;
        assign rout_ready[N][P_EAST] = 1'b1;
      end

      if (x > 0) begin : g_w
        assign rin_valid[N][P_WEST]  = rout_valid[N-1][P_EAST];
        assign rin_flit[N][P_WEST]   = rout_flit[N-1][P_EAST];
        assign rout_ready[N][P_WEST] = rin_ready[N-1][P_EAST];
      end else if (CORNER) begin : g_w_mc
        assign rin_valid[N][P_WEST]  = mc_in_valid_i[K];
        assign rin_flit[N][P_WEST]   = mc_in_flit_i[K];
        assign mc_in_ready_o[K]      = rin_ready[N][P_WEST];
        assign mc_out_valid_o[K]     = rout_valid[N][P_WEST];
        assign mc_out_flit_o[K]      = rout_flit[N][P_WEST];
        assign rout_ready[N][P_WEST] = mc_out_ready_i[K];
      end else begin : g_w_tie
        assign rin_valid[N][P_WEST]  = 1'b0;
        assign rin_flit[N][P_WEST]   = '0;
        assign rout_ready[N][P_WEST] = 1'b1;
      end

      if (y < D - 1) begin : g_n
        assign rin_valid[N][P_NORTH]  = rout_valid[N+D][P_SOUTH];
        assign rin_flit[N][P_NORTH]   = rout_flit[N+D][P_SOUTH];
        assign rout_ready[N][P_NORTH] = rin_ready[N+D][P_SOUTH];
      end else begin : g_n_tie
        assign rin_valid[N][P_NORTH]  = 1'b0;
        assign rin_flit[N][P_NORTH]   = '0;
        assign rout_ready[N][P_NORTH] = 1'b1;
      end

      if (y > 0) begin : g_s
        assign rin_valid[N][P_SOUTH]  = rout_valid[N-D][P_NORTH];
        assign rin_flit[N][P_SOUTH]   = rout_flit[N-D][P_NORTH];
        assign rout_ready[N][P_SOUTH] = rin_ready[N-D][P_NORTH];
      end else begin : g_s_tie
        assign rin_valid[N][P_SOUTH]  = 1'b0;
        assign rin_flit[N][P_SOUTH]   = '0;
        assign rout_ready[N][P_SOUTH] = 1'b1;
      end
    end
  end

endmodule
