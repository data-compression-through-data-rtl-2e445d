// tb_ni_rx -- self-checking test of the ejection half of the network interface.
// The testbench builds packets with the reference encoder (lines of every class,
// header-only messages too) and sends them flit by flit with random gaps, while the
// message consumer applies random backpressure. Each delivered message must carry
// the sent header and the original line, and must be valid the cycle after its tail
// flit was accepted.
module tb_ni_rx;
  import noc_comp_pkg::*;
  import tb_ref_pkg::*;

  logic    clk = 0, rst_n = 0;
  logic    fv = 0, fr;
  flit_t   f;
  logic    mv, mr;
  header_t mh;
  line_t   ml;
  int      checks = 0, failures = 0, cycle = 0;

  ni_rx dut (.clk, .rst_n, .flit_valid_i(fv), .flit_ready_o(fr), .flit_i(f),
             .msg_valid_o(mv), .msg_ready_i(mr), .msg_hdr_o(mh), .msg_line_o(ml));

  always #5 clk = ~clk;
  always @(negedge clk) cycle++;
  always @(negedge clk) mr <= ($urandom_range(2, 0) != 0);

  typedef struct { header_t hdr; line_t line; bit data; } exp_t;
  exp_t q[$];
  int tail_cycle = -1, stalls = 0, n_msgs = 0;

  always @(posedge clk) if (rst_n) begin
    if (fv && !fr) stalls++;
    if (fv && fr && f.tail) tail_cycle = cycle;
    if (mv && mr) begin
      exp_t e;
      e = q.pop_front();
      checks++;
      if (mh !== e.hdr || (e.data && ml !== e.line)) begin
        failures++;
        $display("FAIL msg %0d hdr=%h/%h line=%h/%h", n_msgs, mh, e.hdr, ml, e.line);
      end
      n_msgs++;
    end
  end

  // valid must rise exactly one cycle after the tail is taken
  logic mv_d = 0;
  always @(posedge clk) if (rst_n) begin
    if (mv && !mv_d) begin
      checks++;
      if (cycle - tail_cycle != 1) begin
        failures++;
        $display("FAIL message valid %0d cycles after tail", cycle - tail_cycle);
      end
    end
    mv_d <= mv && !(mv && mr);
  end

  task automatic put(flit_t x);
    f = x; fv = 1;
    @(posedge clk);
    while (!fr) @(posedge clk);
    #1 fv = 0;
    repeat ($urandom_range(1, 0)) @(posedge clk);
    #1;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_t  e;
    ref_t  r;
    flit_t x;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      e.line = gen_line(n % 5);
      e.hdr.msg  = msg_t'($urandom_range(3, 0));
      e.hdr.dst  = 5'($urandom); e.hdr.src = 5'($urandom); e.hdr.addr = 14'($urandom);
      e.data = (e.hdr.msg inside {MSG_WR_REQ, MSG_RD_REPLY});
      r = ref_compress(e.line);
      e.hdr.enc  = e.data ? r.enc : ENC_NONE;
      e.hdr.sign = e.data ? r.sign : '0;
      q.push_back(e);
      x.head = 1; x.tail = !e.data || r.nflits == 1; x.data = 32'(e.hdr);
      put(x);
      if (e.data) for (int k = 1; k < r.nflits; k++) begin
        x.head = 0; x.tail = (k == r.nflits - 1); x.data = r.body[(k - 1) * 32 +: 32];
        put(x);
      end
    end
    wait (q.size() == 0);
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no backpressure seen"); end
    $display("messages=%0d stalls=%0d", n_msgs, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
