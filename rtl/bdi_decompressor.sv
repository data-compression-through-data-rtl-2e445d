// bdi_decompressor -- decompression unit of the network interface (ejection side).
//
// Every decompression unit works on the received body in parallel and the header's
// 3-bit encoding selects the one whose output goes back to the L2 bank:
//   000 zero      -> all words zero (no body was sent)
//   001 repeat    -> body word B0 copied to all four words
//   010 B4D1      -> delta_decomp with 1-byte deltas
//   011 B4D2      -> delta_decomp with 2-byte deltas
//   111 none      -> the 16 body bytes unchanged (base taken as zero)
// Any other code is treated as uncompressed. Combinational.
// The unit list and the selection by encoding follow the design description.
module bdi_decompressor
  import noc_comp_pkg::*;
(
  input  enc_t              enc_i,
  input  logic [NDELTA-1:0] sign_i,
  input  body_t             body_i,
  output line_t             line_o
);

  line_t d1_line, d2_line;

  delta_decomp #(.DELTA_BYTES(1)) u_b4d1 (
    .body_i(body_i[WORD_W+NDELTA*8-1:0]), .sign_i, .line_o(d1_line));
  delta_decomp #(.DELTA_BYTES(2)) u_b4d2 (
    .body_i(body_i[WORD_W+NDELTA*16-1:0]), .sign_i, .line_o(d2_line));

  always_comb begin
    unique case (enc_i)
      ENC_ZERO: line_o = '0;
      ENC_REP:  line_o = {LINE_WORDS{body_i[WORD_W-1:0]}};
      ENC_B4D1: line_o = d1_line;
      ENC_B4D2: line_o = d2_line;
      default:  line_o = body_i;
    endcase
  end

endmodule
