// tb_mesh_noc -- self-checking test of the 4x4 mesh without network interfaces.
// Raw packets of 1..5 flits are injected at all 16 local ports and the 4 corner
// controller ports towards random tiles and controllers, with random backpressure at
// the exits. Each packet must leave at the port of its destination, whole and
// unchanged, and packets between the same two ports must keep their order. A
// single packet crossing the whole mesh (tile 0 to tile 15, 7 routers) on an idle
// network must take 7 * PIPE_STAGES + 6 * (N-1) cycles from tail in to head out of
// the last router, as the store-and-forward timing of the routers gives.
module tb_mesh_noc;
  import noc_comp_pkg::*;

  localparam int NT = 16, NE = 20;

  logic          clk = 0, rst_n = 0;
  logic [15:0]   liv, lir, lov, lor;
  flit_t         lif [16];
  flit_t         lof [16];
  logic [3:0]    miv, mir, mov, mor;
  flit_t         mif [4];
  flit_t         mof [4];
  int            checks = 0, failures = 0, cycle = 0;
  bit            bp = 0;

  mesh_noc dut (.clk, .rst_n,
    .local_in_valid_i(liv), .local_in_ready_o(lir), .local_in_flit_i(lif),
    .local_out_valid_o(lov), .local_out_ready_i(lor), .local_out_flit_o(lof),
    .mc_in_valid_i(miv), .mc_in_ready_o(mir), .mc_in_flit_i(mif),
    .mc_out_valid_o(mov), .mc_out_ready_i(mor), .mc_out_flit_o(mof));

  always #5 clk = ~clk;
  always @(negedge clk) cycle++;
  always @(negedge clk) begin
    for (int i = 0; i < 16; i++) lor[i] <= bp ? ($urandom_range(3, 0) != 0) : 1'b1;
    for (int i = 0; i < 4; i++)  mor[i] <= bp ? ($urandom_range(3, 0) != 0) : 1'b1;
  end

  function automatic logic [4:0] node_of(int e);
    if (e < NT) return 5'(e);
    return {1'b1, ((e - NT) >= 2) ? 2'd3 : 2'd0, ((e - NT) % 2 == 1) ? 2'd3 : 2'd0};
  endfunction
  function automatic int ep_of(logic [4:0] n);
    if (!n[4]) return int'(n[3:0]);
    return NT + ((n[3:2] == 2'd3) ? 2 : 0) + ((n[1:0] == 2'd3) ? 1 : 0);
  endfunction

  flit_t pf [int][5];
  int    q [NE*NE][$];          // per (src, dst) pair: packet ids in order
  int    cur_pkt [NE], cur_idx [NE];
  int    next_id = 0, n_sent = 0, n_recv = 0, done_src = 0, t_tail = 0, t_head = 0;

  // endpoint-indexed views of the port arrays
  function automatic logic out_v(int e);  return (e < NT) ? lov[e] : mov[e - NT]; endfunction
  function automatic logic out_r(int e);  return (e < NT) ? lor[e] : mor[e - NT]; endfunction
  function automatic flit_t out_f(int e); return (e < NT) ? lof[e] : mof[e - NT]; endfunction

  task automatic send(int s, int d, int n);
    header_t h;
    flit_t   x;
    int      id;
    id = next_id++;
    h = '0; h.src = node_of(s); h.dst = node_of(d); h.addr = 14'(id);
    for (int k = 0; k < n; k++) begin
      x.head = (k == 0); x.tail = (k == n - 1); x.data = (k == 0) ? 32'(h) : $urandom;
      pf[id][k] = x;
    end
    q[s*NE + d].push_back(id);
    for (int k = 0; k < n; k++) begin
      if (s < NT) begin lif[s] = pf[id][k]; liv[s] = 1; end
      else begin mif[s-NT] = pf[id][k]; miv[s-NT] = 1; end
      @(posedge clk);
      while (!((s < NT) ? lir[s] : mir[s-NT])) @(posedge clk);
      t_tail = cycle;
      #1;
      if (s < NT) liv[s] = 0; else miv[s-NT] = 0;
    end
    n_sent++;
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int e = 0; e < NE; e++) if (out_v(e) && out_r(e)) begin
      flit_t f;
      f = out_f(e);
      if (f.head) begin
        header_t h;
        int s;
        h = header_t'(f.data);
        s = ep_of(h.src);
        t_head = cycle;
        checks++;
        if (ep_of(h.dst) != e || q[s*NE + e].size() == 0) begin
          failures++;
          $display("FAIL packet for %0d from %0d left at %0d", ep_of(h.dst), s, e);
          cur_pkt[e] = -1;
        end else begin
          cur_pkt[e] = q[s*NE + e].pop_front();
        end
        cur_idx[e] = 0;
      end
      if (cur_pkt[e] >= 0) begin
        checks++;
        if (f !== pf[cur_pkt[e]][cur_idx[e]]) begin
          failures++;
          $display("FAIL endpoint %0d flit %0d", e, cur_idx[e]);
        end
        cur_idx[e]++;
        if (f.tail) n_recv++;
      end
    end
  end

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    liv = '0; miv = '0;
    foreach (lif[i]) lif[i] = '0;
    foreach (mif[i]) mif[i] = '0;
    foreach (cur_pkt[i]) cur_pkt[i] = -1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // corner-to-corner timing on an idle mesh
    for (int n = 1; n <= 5; n++) begin
      send(0, 15, n);
      wait (n_recv == n_sent);
      checks++;
      // tail into router 0 .. head out of router 15 = 7 routers + 6 links of N-1 trailing flits
      if (t_head - t_tail != 7 * 5 + 6 * (n - 1)) begin
        failures++;
        $display("FAIL %0d-flit crossing took %0d cycles", n, t_head - t_tail);
      end
      repeat (5) @(posedge clk);
      #1;
    end
    bp = 1;
    for (int s = 0; s < NE; s++) begin
      automatic int ss = s;
      fork
        begin
          for (int k = 0; k < 60; k++) send(ss, $urandom_range(NE - 1, 0), $urandom_range(5, 1));
          done_src++;
        end
      join_none
    end
    wait (done_src == NE);
    wait (n_recv == n_sent);
    repeat (20) @(posedge clk);
    checks++;
    if (n_recv != NE * 60 + 5) begin failures++; $display("FAIL received %0d", n_recv); end
    $display("packets=%0d cycles=%0d", n_recv, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
