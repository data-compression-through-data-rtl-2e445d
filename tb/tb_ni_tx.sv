// tb_ni_tx -- self-checking test of the injection half of the network interface.
// Random messages of all four kinds, with lines of every compression class, are
// offered with random gaps; the flit sink applies random backpressure. Each packet
// is checked flit by flit against the reference encoder (header fields, encoding,
// sign bits, body words, head/tail flags, length). With the sink always ready, an
// N-flit packet must take exactly N cycles and packets must follow back to back.
module tb_ni_tx;
  import noc_comp_pkg::*;
  import tb_ref_pkg::*;

  localparam logic [NODE_W-1:0] ME = 5'd6;

  logic              clk = 0, rst_n = 0;
  logic              req_valid = 0, req_ready;
  msg_t              req_msg;
  logic [NODE_W-1:0] req_dst;
  logic [ADDR_W-1:0] req_addr;
  line_t             req_line;
  logic              fv, fr;
  flit_t             f;
  int                checks = 0, failures = 0, cycle = 0;

  ni_tx #(.NODE_ID(ME)) dut (
    .clk, .rst_n, .req_valid_i(req_valid), .req_ready_o(req_ready), .req_msg_i(req_msg),
    .req_dst_i(req_dst), .req_addr_i(req_addr), .req_line_i(req_line),
    .flit_valid_o(fv), .flit_ready_i(fr), .flit_o(f));

  always #5 clk = ~clk;
  always @(negedge clk) cycle++;

  typedef struct {
    header_t hdr;
    body_t   body;
    int      nflits;
  } pkt_t;
  pkt_t q[$];
  bit   bp_on = 1;
  int   stalls = 0;

  // expected-packet queue, filled at the accepting edge
  always @(posedge clk) if (rst_n && req_valid && req_ready) begin
    pkt_t p;
    ref_t r;
    r = ref_compress(req_line);
    p.hdr.msg = req_msg; p.hdr.dst = req_dst; p.hdr.src = ME; p.hdr.addr = req_addr;
    if (req_msg inside {MSG_WR_REQ, MSG_RD_REPLY}) begin
      p.hdr.enc = r.enc; p.hdr.sign = r.sign; p.body = r.body; p.nflits = r.nflits;
    end else begin
      p.hdr.enc = ENC_NONE; p.hdr.sign = 0; p.body = 0; p.nflits = 1;
    end
    q.push_back(p);
  end

  // sink: random backpressure
  always @(negedge clk) fr <= bp_on ? ($urandom_range(3, 0) != 0) : 1'b1;

  int fidx = 0;
  int n_pkts = 0;
  int first_cycle = -1, last_cycle = 0, flits_total = 0;
  always @(posedge clk) if (rst_n) begin
    if (fv && !fr) stalls++;
    if (fv && fr) begin
      pkt_t p;
      logic [31:0] exp;
      p = q[0];
      exp = (fidx == 0) ? 32'(p.hdr) : p.body[(fidx - 1) * 32 +: 32];
      checks++;
      if (f.data !== exp || f.head !== (fidx == 0) || f.tail !== (fidx == p.nflits - 1)) begin
        failures++;
        $display("FAIL pkt %0d flit %0d data=%h exp=%h head=%b tail=%b", n_pkts, fidx, f.data,
                 exp, f.head, f.tail);
      end
      if (first_cycle < 0) first_cycle = cycle;
      last_cycle = cycle;
      flits_total++;
      if (fidx == p.nflits - 1) begin
        void'(q.pop_front());
        fidx = 0;
        n_pkts++;
      end else fidx++;
    end
  end

  task automatic send(msg_t m, line_t l);
    req_msg = m; req_dst = 5'($urandom); req_addr = 14'($urandom); req_line = l;
    req_valid = 1;
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    #1 req_valid = 0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      send(msg_t'($urandom_range(3, 0)), gen_line($urandom_range(4, 0)));
      repeat ($urandom_range(2, 0)) @(posedge clk);
      #1;
    end
    wait (q.size() == 0);
    // throughput: sink always ready, requests back to back
    bp_on = 0;
    @(posedge clk); #1;
    first_cycle = -1; flits_total = 0;
    for (int n = 0; n < 50; n++) begin
      req_msg = MSG_RD_REPLY; req_dst = 0; req_addr = 14'(n); req_line = gen_line(n % 5);
      req_valid = 1;
      @(posedge clk);
      while (!req_ready) @(posedge clk);
      #1;
    end
    req_valid = 0;
    wait (q.size() == 0);
    @(posedge clk);
    checks++;
    if (last_cycle - first_cycle + 1 != flits_total) begin
      failures++;
      $display("FAIL back-to-back: %0d flits over %0d cycles", flits_total,
               last_cycle - first_cycle + 1);
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no backpressure seen"); end
    $display("packets=%0d stalls=%0d", n_pkts, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
