// ni_rx -- ejection side of the network interface: collect, decompress, deliver.
//
// Flits arrive one per cycle with a valid/ready handshake. The head flit is kept as
// the packet header; body flits are stored in order into a 16-byte body register.
// When the tail flit has been taken the message is presented on the output, the
// cache line rebuilt by bdi_decompressor from the header's encoding and sign bits.
// While a finished message waits to be taken, no new flit is accepted.
// Timing: the message is valid in the cycle after its tail flit is accepted; with no
// backpressure an N-flit packet is delivered N cycles after its head flit arrives.
// Decompressing before ejection follows the design description; the handshake and the
// head/tail flags are this design's own choices.
module ni_rx
  import noc_comp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // flits from the network
  input  logic              flit_valid_i,
  output logic              flit_ready_o,
  input  flit_t             flit_i,
  // message to the cache side
  output logic              msg_valid_o,
  input  logic              msg_ready_i,
  output header_t           msg_hdr_o,
  output line_t             msg_line_o
);

  header_t    hdr_q;
  body_t      body_q;
  logic [2:0] cnt_q;     // body flits stored so far
  logic       done_q;

  assign flit_ready_o = !done_q;
  assign msg_valid_o  = done_q;
  assign msg_hdr_o    = hdr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hdr_q  <= '0;
      body_q <= '0;
      cnt_q  <= '0;
      done_q <= 1'b0;
    end else begin
      if (done_q && msg_ready_i) done_q <= 1'b0;
      if (flit_valid_i && flit_ready_o) begin
        if (flit_i.head) begin
          hdr_q  <= header_t'(flit_i.data);
          body_q <= '0;
          cnt_q  <= '0;
        end else begin
          body_q[32'(cnt_q) * FLIT_W +: FLIT_W] <= flit_i.data;
          cnt_q <= cnt_q + 3'd1;
        end
        if (flit_i.tail) done_q <= 1'b1;
      end
    end
  end

  bdi_decompressor u_decomp (
    .enc_i(hdr_q.enc), .sign_i(hdr_q.sign), .body_i(body_q), .line_o(msg_line_o));

  // Body never overruns the 4 body flits of an uncompressed line.
  a_body: assert property (@(posedge clk) disable iff (!rst_n)
                           flit_valid_i && flit_ready_o && !flit_i.head |-> cnt_q < 3'(LINE_WORDS));

endmodule
