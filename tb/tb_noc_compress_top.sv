// tb_noc_compress_top -- end-to-end test of the compressing 4x4 mesh NoC.
// Runs the top with its default parameters.
// Phase 0 (memory access paths): a read that misses in L1 and in the L2 bank goes
// tile -> L2 bank -> memory controller, and the line returns controller -> bank ->
// tile; the line must arrive unchanged at both, carried as a B4D1 packet.
// Phase 1 (latency against hop count): a single read reply of each compression class
// is sent from tile 0 to tiles 1..6 router hops away, one at a time on an idle
// network. The message must arrive intact, and each extra hop must add exactly
// N + PIPE_STAGES - 1 cycles for an N-flit packet (store and forward), so that
// compressed packets gain more the further they travel.
// Phase 2 (random traffic): all 16 tiles and 4 memory controllers send random
// messages of the four kinds, with lines of every class, to random tiles and
// controllers, while the receivers apply random backpressure. Every message must be
// delivered once, to the right endpoint, with its header and original line. The
// test counts each mechanism -- each of the five encodings, header-only messages,
// controller traffic, the miss path, injection stalls and delivery backpressure -- and fails if
// one never happened.
module tb_noc_compress_top;
  import noc_comp_pkg::*;
  import tb_ref_pkg::*;

  localparam int NT = 16, NE = 20, PIPE = 5;

  logic              clk = 0, rst_n = 0;
  logic [NE-1:0]     req_valid, req_ready, msg_valid, msg_ready;
  msg_t              req_msg  [NE];
  logic [NODE_W-1:0] req_dst  [NE];
  logic [ADDR_W-1:0] req_addr [NE];
  line_t             req_line [NE];
  header_t           msg_hdr  [NE];
  line_t             msg_line [NE];
  int                checks = 0, failures = 0, cycle = 0;

  noc_compress_top dut (
    .clk, .rst_n, .req_valid_i(req_valid), .req_ready_o(req_ready), .req_msg_i(req_msg),
    .req_dst_i(req_dst), .req_addr_i(req_addr), .req_line_i(req_line),
    .msg_valid_o(msg_valid), .msg_ready_i(msg_ready), .msg_hdr_o(msg_hdr),
    .msg_line_o(msg_line));

  always #5 clk = ~clk;
  always @(negedge clk) cycle++;

  function automatic logic [4:0] node_of(int e);
    if (e < NT) return 5'(e);
    return {1'b1, ((e - NT) >= 2) ? 2'd3 : 2'd0, ((e - NT) % 2 == 1) ? 2'd3 : 2'd0};
  endfunction
  function automatic int ep_of(logic [4:0] n);
    if (!n[4]) return int'(n[3:0]);
    return NT + ((n[3:2] == 2'd3) ? 2 : 0) + ((n[1:0] == 2'd3) ? 1 : 0);
  endfunction

  // scoreboard keyed by {source node, address}
  typedef struct { header_t hdr; line_t line; int dst_ep; int t_sent; } exp_t;
  exp_t exp_m [int];
  int   n_sent = 0, n_recv = 0, last_latency = 0;
  int   enc_seen [8];
  int   hdr_only = 0, mc_msgs = 0, inj_stall = 0, ej_bp = 0;
  bit   bp = 0;

  always @(negedge clk) for (int e = 0; e < NE; e++) msg_ready[e] <= bp ? ($urandom_range(3, 0) != 0) : 1'b1;

  always @(posedge clk) if (rst_n) begin
    for (int e = 0; e < NE; e++) begin
      if (req_valid[e] && !req_ready[e]) inj_stall++;
      if (msg_valid[e] && !msg_ready[e]) ej_bp++;
      if (msg_valid[e] && msg_ready[e]) begin
        int   key;
        exp_t x;
        key = {msg_hdr[e].src, msg_hdr[e].addr};
        checks++;
        if (!exp_m.exists(key)) begin
          failures++;
          $display("FAIL endpoint %0d: unexpected message src=%h addr=%h", e, msg_hdr[e].src,
                   msg_hdr[e].addr);
        end else begin
          x = exp_m[key];
          exp_m.delete(key);
          if (x.dst_ep != e || msg_hdr[e] !== x.hdr || (msg_has_data(x.hdr.msg) && msg_line[e] !== x.line)) begin
            failures++;
            $display("FAIL endpoint %0d: hdr %h/%h line %h/%h", e, msg_hdr[e], x.hdr, msg_line[e], x.line);
          end
          if (msg_has_data(x.hdr.msg)) enc_seen[x.hdr.enc]++;
          else hdr_only++;
          if (e >= NT || x.hdr.src[4]) mc_msgs++;
          last_latency = cycle - x.t_sent;
          n_recv++;
        end
      end
    end
  end

  int addr_ctr = 0;
  task automatic send(int e, msg_t m, logic [4:0] dst, line_t l);
    exp_t x;
    ref_t r;
    int   key;
    req_msg[e] = m; req_dst[e] = dst; req_line[e] = l; req_addr[e] = 14'(addr_ctr);
    addr_ctr = (addr_ctr + 1) % 16384;
    r = ref_compress(l);
    x.hdr.enc  = msg_has_data(m) ? r.enc : ENC_NONE;
    x.hdr.sign = msg_has_data(m) ? r.sign : '0;
    x.hdr.msg = m; x.hdr.dst = dst; x.hdr.src = node_of(e); x.hdr.addr = req_addr[e];
    x.line = l; x.dst_ep = ep_of(dst);
    key = {x.hdr.src, x.hdr.addr};
    req_valid[e] = 1;
    @(posedge clk);
    while (!req_ready[e]) @(posedge clk);
    x.t_sent = cycle;
    exp_m[key] = x;
    n_sent++;
    #1 req_valid[e] = 0;
  endtask

  int done_src = 0;
  int miss_path = 0;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat [5][7];
    int dsts [7];
    int nfl;
    string names [5];
    req_valid = '0;
    for (int e = 0; e < NE; e++) begin
      req_msg[e] = MSG_RD_REQ; req_dst[e] = '0; req_addr[e] = '0; req_line[e] = '0;
    end
    foreach (enc_seen[i]) enc_seen[i] = 0;
    names = '{"ZC", "FC", "B4D1", "B4D2", "NoCmp"};
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // ---- phase 0: an L1 miss that also misses in L2 (paths 1..5) ----
    // tile 4 asks L2 bank at tile 6, which asks memory controller 17 (corner x3y0);
    // the line comes back to the bank and then to tile 4, compressed on each leg.
    begin
      line_t mem_line;
      mem_line[0] = $urandom;
      mem_line[1] = mem_line[0] + 32'd17;
      mem_line[2] = mem_line[0] - 32'd200;
      mem_line[3] = mem_line[0] + 32'd3;
      send(4, MSG_RD_REQ, 5'd6, '0);               // path 1
      wait (n_recv == n_sent);
      send(6, MSG_RD_REQ, node_of(17), '0);        // path 2 (path 3 is off chip)
      wait (n_recv == n_sent);
      send(17, MSG_RD_REPLY, 5'd6, mem_line);      // path 4
      wait (n_recv == n_sent);
      checks++;
      if (msg_line[6] !== mem_line) begin failures++; $display("FAIL line at L2 bank"); end
      send(6, MSG_RD_REPLY, 5'd4, msg_line[6]);    // path 5
      wait (n_recv == n_sent);
      checks++;
      if (msg_line[4] !== mem_line || msg_hdr[4].enc !== ENC_B4D1) begin
        failures++;
        $display("FAIL line at requesting tile");
      end
      miss_path++;
      repeat (5) @(posedge clk);
      #1;
    end

    // ---- phase 1: latency against hop count, idle network ----
    dsts = '{0, 1, 2, 3, 7, 11, 15};   // 0..6 hops from tile 0 (x first, then y)
    for (int c = 0; c < 5; c++) begin
      for (int h = 1; h < 7; h++) begin
        send(0, MSG_RD_REPLY, 5'(dsts[h]), gen_line(c));
        wait (n_recv == n_sent);
        lat[c][h] = last_latency;
        repeat (5) @(posedge clk);
        #1;
      end
      nfl = c + 1;
      $write("%-6s flits=%0d latency(h=1..6):", names[c], nfl);
      for (int h = 1; h < 7; h++) $write(" %0d", lat[c][h]);
      $write("\n");
      for (int h = 2; h < 7; h++) begin
        checks++;
        if (lat[c][h] - lat[c][h-1] != nfl + PIPE - 1) begin
          failures++;
          $display("FAIL %s: hop %0d adds %0d cycles, expected %0d", names[c], h,
                   lat[c][h] - lat[c][h-1], nfl + PIPE - 1);
        end
      end
    end
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (lat[c][6] >= lat[c+1][6]) begin
        failures++;
        $display("FAIL %s not faster than %s", names[c], names[c+1]);
      end
    end

    // ---- phase 2: random traffic from every endpoint ----
    bp = 1;
    for (int e = 0; e < NE; e++) begin
      automatic int ee = e;
      fork
        begin
          int d;
          for (int n = 0; n < 40; n++) begin
            d = $urandom_range(NE - 1, 0);
            send(ee, msg_t'($urandom_range(3, 0)), node_of(d), gen_line($urandom_range(4, 0)));
            repeat ($urandom_range(3, 0)) @(posedge clk);
            #1;
          end
          done_src++;
        end
      join_none
    end
    wait (done_src == NE);
    wait (n_recv == n_sent);
    repeat (20) @(posedge clk);

    checks++;
    if (exp_m.size() != 0) begin failures++; $display("FAIL %0d messages lost", exp_m.size()); end
    $display("cycles=%0d", cycle);
    $display("messages=%0d zero=%0d repeat=%0d b4d1=%0d b4d2=%0d none=%0d header_only=%0d",
             n_recv, enc_seen[0], enc_seen[1], enc_seen[2], enc_seen[3], enc_seen[7], hdr_only);
    $display("controller_messages=%0d injection_stalls=%0d delivery_backpressure=%0d",
             mc_msgs, inj_stall, ej_bp);
    foreach (enc_seen[i]) if (i inside {0, 1, 2, 3, 7}) begin
      checks++;
      if (enc_seen[i] == 0) begin failures++; $display("FAIL encoding %0d never used", i); end
    end
    checks++;
    if (hdr_only == 0 || mc_msgs == 0 || inj_stall == 0 || ej_bp == 0 || miss_path == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
