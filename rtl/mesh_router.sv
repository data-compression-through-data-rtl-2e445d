// mesh_router -- five-port store-and-forward router of the 2D mesh.
//
// Ports 0..4 are Local, North, East, South, West (constants in noc_comp_pkg). Every
// input port has a flit buffer of BUF_DEPTH flits. Store and forward: a packet may
// only compete for its output once its tail flit is in the buffer. The route is
// dimension-ordered (XY): first along X to the destination column, then along Y;
// at the destination router the packet leaves on the Local port, or, if the
// destination number has its memory-controller bit set, on the outer edge port of
// that corner router (West for column 0, East otherwise). Each output has a
// round-robin arbiter and stays with one input until that packet's tail has passed.
// Outputs are registered. Timing: a complete packet waits PIPE_STAGES-3 cycles
// before it requests the output; with the grant cycle, the output register and the
// link, its head is taken by the next router PIPE_STAGES cycles after its tail was
// taken by this one, standing in for the five-stage router pipeline. Flits then
// follow one per cycle, so an N-flit packet costs N + PIPE_STAGES - 1 cycles per hop.
// From the design description: 5 ports, XY routing, store and forward, a 5-stage
// pipeline, 2 virtual channels of 4 flits per port. This design's own choices: the
// two virtual channels are merged into one 8-flit queue per input (no VC
// allocation), the pipeline is a fixed wait rather than separate stages, and the
// valid/ready link handshake.
module mesh_router
  import noc_comp_pkg::*;
#(
  parameter logic [COORD_W-1:0] X           = '0,
  parameter logic [COORD_W-1:0] Y           = '0,
  parameter int unsigned        BUF_DEPTH   = 8,   // 2 VCs x 4 flits
  parameter int unsigned        PIPE_STAGES = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPORTS-1:0] in_valid_i,
  output logic [NPORTS-1:0] in_ready_o,
  input  flit_t             in_flit_i  [NPORTS],
  output logic [NPORTS-1:0] out_valid_o,
  input  logic [NPORTS-1:0] out_ready_i,
  output flit_t             out_flit_o [NPORTS]
);

  localparam int unsigned PW   = $clog2(BUF_DEPTH);
  localparam int unsigned CW   = $clog2(BUF_DEPTH + 1);
  localparam int unsigned WAIT = (PIPE_STAGES > 3) ? PIPE_STAGES - 3 : 0;
  localparam int unsigned WW   = $clog2(WAIT + 2);

  typedef logic [2:0] port_t;

  function automatic port_t route(logic [NODE_W-1:0] dst);
    logic [COORD_W-1:0] dx, dy;
    dx = dst[COORD_W-1:0];
    dy = dst[2*COORD_W-1:COORD_W];
    if (dx > X)      return port_t'(P_EAST);
    else if (dx < X) return port_t'(P_WEST);
    else if (dy > Y) return port_t'(P_NORTH);
    else if (dy < Y) return port_t'(P_SOUTH);
    else if (dst[NODE_W-1]) return (X == '0) ? port_t'(P_WEST) : port_t'(P_EAST);
    else             return port_t'(P_LOCAL);
  endfunction

  // ---------------- input buffers ----------------
  flit_t         mem   [NPORTS][BUF_DEPTH];
  logic [PW-1:0] rd_q  [NPORTS];
  logic [PW-1:0] wr_q  [NPORTS];
  logic [CW-1:0] cnt_q [NPORTS];
  logic [CW-1:0] pkts_q[NPORTS];   // complete packets held
  logic [WW-1:0] wait_q[NPORTS];
  logic [NPORTS-1:0] active_q;     // input is streaming a granted packet
  flit_t         front [NPORTS];
  port_t         req_port [NPORTS];
  logic [NPORTS-1:0] eligible, push, pop;

  // ---------------- outputs ----------------
  logic [NPORTS-1:0] busy_q;
  port_t             owner_q [NPORTS];
  port_t             rr_q    [NPORTS];
  logic [NPORTS-1:0] out_valid_q;
  flit_t             out_flit_q [NPORTS];
  logic [NPORTS-1:0] can_load, grant_v;
  port_t             grant_in [NPORTS];
  logic [NPORTS-1:0] in_granted;

  always_comb begin
    logic [3:0]  sel;
    port_t       idx;
    header_t     front_hdr;
    sel       = '0;
    idx       = '0;
    front_hdr = '0;
    for (int i = 0; i < NPORTS; i++) begin
      in_ready_o[i] = (cnt_q[i] < CW'(BUF_DEPTH));
      push[i]       = in_valid_i[i] && in_ready_o[i];
      front[i]      = mem[i][rd_q[i]];
      front_hdr     = header_t'(front[i].data);
      req_port[i]   = route(front_hdr.dst);
      eligible[i]   = !active_q[i] && (pkts_q[i] != '0) && (wait_q[i] == WW'(WAIT));
    end
    in_granted = '0;
    for (int o = 0; o < NPORTS; o++) begin
      can_load[o] = !out_valid_q[o] || out_ready_i[o];
      grant_v[o]  = 1'b0;
      grant_in[o] = '0;
      if (!busy_q[o]) begin
        for (int k = 0; k < NPORTS; k++) begin
          // round-robin order starting at rr_q[o]
          sel = 4'(rr_q[o]) + 4'(k);
          if (sel >= 4'(NPORTS)) sel = sel - 4'(NPORTS);
          idx = sel[2:0];
          if (!grant_v[o] && eligible[idx] && !in_granted[idx] && req_port[idx] == port_t'(o)) begin
            grant_v[o]      = 1'b1;
            grant_in[o]     = idx;
            in_granted[idx] = 1'b1;
          end
        end
      end
    end
  end

  // An input is read when the output that owns it can take a flit.
  always_comb begin
    pop = '0;
    for (int o = 0; o < NPORTS; o++)
      for (int i = 0; i < NPORTS; i++)
        pop[i] = pop[i] | (busy_q[o] && can_load[o] && owner_q[o] == port_t'(i));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NPORTS; i++) begin
        rd_q[i] <= '0; wr_q[i] <= '0; cnt_q[i] <= '0; pkts_q[i] <= '0; wait_q[i] <= '0;
        busy_q[i] <= 1'b0; owner_q[i] <= '0; rr_q[i] <= '0;
        out_valid_q[i] <= 1'b0; out_flit_q[i] <= '0;
      end
      active_q <= '0;
    end else begin
      for (int i = 0; i < NPORTS; i++) begin
        if (push[i]) wr_q[i] <= (wr_q[i] == PW'(BUF_DEPTH - 1)) ? '0 : wr_q[i] + 1'b1;
        if (pop[i]) rd_q[i] <= (rd_q[i] == PW'(BUF_DEPTH - 1)) ? '0 : rd_q[i] + 1'b1;
        cnt_q[i]  <= cnt_q[i] + CW'(push[i]) - CW'(pop[i]);
        pkts_q[i] <= pkts_q[i] + CW'(push[i] && in_flit_i[i].tail) - CW'(pop[i] && front[i].tail);
        if (in_granted[i])                          wait_q[i] <= '0;
        else if (!active_q[i] && pkts_q[i] != '0 && wait_q[i] != WW'(WAIT))
                                                    wait_q[i] <= wait_q[i] + 1'b1;
        if (in_granted[i])               active_q[i] <= 1'b1;
        else if (pop[i] && front[i].tail) active_q[i] <= 1'b0;
      end
      for (int o = 0; o < NPORTS; o++) begin
        if (can_load[o]) out_valid_q[o] <= 1'b0;
        if (grant_v[o]) begin
          busy_q[o]  <= 1'b1;
          owner_q[o] <= grant_in[o];
          rr_q[o]    <= (grant_in[o] == port_t'(NPORTS - 1)) ? '0 : grant_in[o] + 1'b1;
        end else if (busy_q[o] && can_load[o]) begin
          out_valid_q[o] <= 1'b1;
          out_flit_q[o]  <= front[owner_q[o]];
          if (front[owner_q[o]].tail) busy_q[o] <= 1'b0;
        end
      end
    end
  end

  // Buffer storage: plain memory, no reset (an entry is read only after it is written).
  for (genvar i = 0; i < NPORTS; i++) begin : g_mem
    always_ff @(posedge clk) if (push[i]) mem[i][wr_q[i]] <= in_flit_i[i];
  end

  assign out_valid_o = out_valid_q;
  always_comb for (int o = 0; o < NPORTS; o++) out_flit_o[o] = out_flit_q[o];

  // A packet is forwarded only when it is completely stored, so an active input
  // always has a flit to give.
  for (genvar i = 0; i < NPORTS; i++) begin : g_chk
    a_saf: assert property (@(posedge clk) disable iff (!rst_n) pop[i] |-> cnt_q[i] != '0);
  end

endmodule
