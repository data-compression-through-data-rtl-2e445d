// tb_mesh_router -- self-checking test of one mesh router, placed at (1,1).
// Phase 1 sends single packets, one at a time, from every input to destinations in
// every direction and checks the output port chosen by XY routing, the flits, and the
// store-and-forward timing: the head leaves exactly PIPE_STAGES cycles after the tail
// entered, and then one flit per cycle. Phase 2 drives all five inputs at once with
// random packets (1 to 5 flits) and random output backpressure; every packet must
// come out whole, on its XY port, and in order per input/output pair. Contention
// (a packet waiting longer than the pipeline) and full input buffers are counted and
// must both occur.
module tb_mesh_router;
  import noc_comp_pkg::*;

  localparam int PIPE = 5;
  localparam logic [1:0] RX = 2'd1, RY = 2'd1;

  logic        clk = 0, rst_n = 0;
  logic [4:0]  iv, ir, ov, orr;
  flit_t       ifl [5];
  flit_t       ofl [5];
  int          checks = 0, failures = 0, cycle = 0;
  bit          bp = 0;

  mesh_router #(.X(RX), .Y(RY)) dut (.clk, .rst_n, .in_valid_i(iv), .in_ready_o(ir),
    .in_flit_i(ifl), .out_valid_o(ov), .out_ready_i(orr), .out_flit_o(ofl));

  always #5 clk = ~clk;
  always @(negedge clk) cycle++;
  always @(negedge clk) for (int o = 0; o < 5; o++) orr[o] <= bp ? ($urandom_range(2, 0) != 0) : 1'b1;

  // independent XY reference: x first, then y; local or the corner controller port
  function automatic int xy_port(logic [4:0] d);
    if (d[1:0] > RX) return 2;        // east
    if (d[1:0] < RX) return 4;        // west
    if (d[3:2] > RY) return 1;        // north
    if (d[3:2] < RY) return 3;        // south
    return d[4] ? 2 : 0;
  endfunction

  // packets by id; per input/output pair a queue of packet ids
  flit_t pf [int][5];
  int    ptail [int];
  int    q [25][$];    // index input*5 + output
  int    next_id = 0;
  int    done_src = 0;
  int   cur_in [5];
  int   cur_idx [5];
  int   n_out = 0, n_sent = 0, contention = 0, full_seen = 0, bad_timing = 0;
  bit   strict = 1;

  task automatic send(int i, int nflits, logic [4:0] dst);
    header_t h;
    flit_t   x;
    int      id, o;
    id = next_id++;
    o  = xy_port(dst);
    h = '0;
    h.dst = dst; h.src = 5'(i); h.addr = 14'($urandom);
    for (int k = 0; k < nflits; k++) begin
      x.head = (k == 0); x.tail = (k == nflits - 1);
      x.data = (k == 0) ? 32'(h) : $urandom;
      pf[id][k] = x;
    end
    ptail[id] = 1 << 30;
    q[i*5 + o].push_back(id);
    for (int k = 0; k < nflits; k++) begin
      ifl[i] = pf[id][k]; iv[i] = 1;
      @(posedge clk);
      while (!ir[i]) begin full_seen++; @(posedge clk); end
      if (k == nflits - 1) ptail[id] = cycle;
      #1 iv[i] = 0;
    end
    n_sent++;
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < 5; o++) if (ov[o] && orr[o]) begin
      int i;
      if (ofl[o].head) begin
        header_t h;
        h = header_t'(ofl[o].data);
        i = int'(h.src);
        cur_in[o] = i; cur_idx[o] = 0;
        checks++;
        if (i > 4 || q[i*5 + o].size() == 0) begin
          failures++;
          $display("FAIL unexpected packet on port %0d from %0d", o, i);
        end else begin
          int lat;
          lat = cycle - ptail[q[i*5 + o][0]];
          if (lat > PIPE) contention++;
          if (lat < PIPE || (strict && lat != PIPE)) begin
            bad_timing++;
            failures++;
            $display("FAIL head left %0d cycles after tail (port %0d)", lat, o);
          end
        end
      end
      i = cur_in[o];
      if (i <= 4 && q[i*5 + o].size() != 0) begin
        checks++;
        if (ofl[o] !== pf[q[i*5 + o][0]][cur_idx[o]]) begin
          failures++;
          $display("FAIL port %0d flit %0d got %h", o, cur_idx[o], ofl[o]);
        end
        if (ofl[o].tail) begin void'(q[i*5 + o].pop_front()); n_out++; end
        else cur_idx[o]++;
      end
    end
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] dsts [6];
    iv = 0;
    foreach (ifl[i]) ifl[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // phase 1: local, north, east, south, west and a corner controller
    dsts = '{5'b0_01_01, 5'b0_11_01, 5'b0_00_11, 5'b0_00_01, 5'b0_10_00, 5'b1_00_11};
    for (int i = 0; i < 5; i++)
      foreach (dsts[d]) begin
        send(i, 1 + (d % 5), dsts[d]);
        repeat (12) @(posedge clk);
        #1;
      end
    checks++;
    if (n_out != 30) begin failures++; $display("FAIL phase 1 delivered %0d", n_out); end
    // phase 2: all inputs at once
    strict = 0; bp = 1;
    for (int i = 0; i < 5; i++) begin
      automatic int ii = i;
      fork
        begin
          for (int n = 0; n < 150; n++) send(ii, $urandom_range(5, 1), 5'($urandom));
          done_src++;
        end
      join_none
    end
    wait (done_src == 5);
    repeat (200) @(posedge clk);
    checks++;
    if (n_out != n_sent) begin failures++; $display("FAIL delivered %0d of %0d", n_out, n_sent); end
    checks++;
    if (contention == 0 || full_seen == 0) begin
      failures++;
      $display("FAIL contention=%0d full=%0d", contention, full_seen);
    end
    $display("packets=%0d contention=%0d buffer_full=%0d", n_out, contention, full_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
