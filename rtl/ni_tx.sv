// ni_tx -- injection side of the network interface: compress, packetize, send.
//
// A memory message (read/write request or reply) is accepted with a valid/ready
// handshake. For the two message kinds that carry a cache line (write request, read
// reply) the line goes through bdi_compressor in the accepting cycle; the chosen
// encoding and delta sign bits are written into the header flit and the packed body
// is registered. The packet is then sent one 32-bit flit per cycle: the header flit
// (head=1) and 0..4 body flits, the last one flagged tail. Header-only messages (read
// request, write reply) are a single head+tail flit.
// Timing: request accepted in cycle t, header flit valid from t+1, an N-flit packet
// occupies the link for N cycles without backpressure; a new request is accepted in
// the cycle the last flit leaves, so packets can go back to back.
// Compressing before injection and the packet lengths follow the design description;
// the handshake, the header layout and the per-flit head/tail flags are this
// design's own choices.
module ni_tx
  import noc_comp_pkg::*;
#(
  parameter logic [NODE_W-1:0] NODE_ID = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  // message from the cache side
  input  logic              req_valid_i,
  output logic              req_ready_o,
  input  msg_t              req_msg_i,
  input  logic [NODE_W-1:0] req_dst_i,
  input  logic [ADDR_W-1:0] req_addr_i,
  input  line_t             req_line_i,
  // flits into the network
  output logic              flit_valid_o,
  input  logic              flit_ready_i,
  output flit_t             flit_o
);

  enc_t              c_enc;
  logic [NDELTA-1:0] c_sign;
  body_t             c_body;
  logic [2:0]        c_nflits;

  bdi_compressor u_comp (
    .line_i(req_line_i), .enc_o(c_enc), .sign_o(c_sign), .body_o(c_body), .nflits_o(c_nflits));

  logic       busy;
  header_t    hdr_q;
  body_t      body_q;
  logic [2:0] nflits_q;
  logic [2:0] cnt_q;      // index of the flit being offered, 0 = header
  logic       last_hs;

  assign last_hs     = busy && flit_ready_i && (cnt_q == nflits_q - 3'd1);
  assign req_ready_o = !busy || last_hs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      hdr_q    <= '0;
      body_q   <= '0;
      nflits_q <= 3'd1;
      cnt_q    <= '0;
    end else begin
      if (busy && flit_ready_i) cnt_q <= cnt_q + 3'd1;
      if (last_hs) busy <= 1'b0;
      if (req_valid_i && req_ready_o) begin
        busy       <= 1'b1;
        cnt_q      <= '0;
        hdr_q.msg  <= req_msg_i;
        hdr_q.dst  <= req_dst_i;
        hdr_q.src  <= NODE_ID;
        hdr_q.addr <= req_addr_i;
        if (msg_has_data(req_msg_i)) begin
          hdr_q.enc  <= c_enc;
          hdr_q.sign <= c_sign;
          body_q     <= c_body;
          nflits_q   <= c_nflits;
        end else begin
          hdr_q.enc  <= ENC_NONE;
          hdr_q.sign <= '0;
          body_q     <= '0;
          nflits_q   <= 3'd1;
        end
      end
    end
  end

  always_comb begin
    flit_valid_o = busy;
    flit_o.head  = (cnt_q == 3'd0);
    flit_o.tail  = (cnt_q == nflits_q - 3'd1);
    if (cnt_q == 3'd0) flit_o.data = hdr_q;
    else               flit_o.data = body_q[(32'(cnt_q) - 1) * FLIT_W +: FLIT_W];
  end

  // A packet never exceeds MAX_FLITS flits.
  a_len: assert property (@(posedge clk) disable iff (!rst_n)
                          busy |-> (nflits_q >= 3'd1 && nflits_q <= 3'(MAX_FLITS)));
  // Offered flit is held until accepted.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           flit_valid_o && !flit_ready_i |=> flit_valid_o && $stable(flit_o));

endmodule
