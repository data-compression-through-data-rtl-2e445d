// comp_priority_mux -- compression-side priority multiplexer.
//
// All compression units look at the same line in parallel; this mux picks the
// result of the highest-priority unit that succeeded, which is also the one giving
// the fewest body flits: Zero (1) > Repeat value (2) > B4D1 (3) > B4D2 (4) >
// No compression (5, always possible). It outputs the 3-bit encoding and delta sign
// bits for the header, the body bytes packed from bit 0 upward, and the packet length
// in flits (header included). Combinational.
// Priorities, encodings and packet lengths follow the design description; sign bits
// are forced to zero for encodings that carry no deltas (this design's choice).
module comp_priority_mux
  import noc_comp_pkg::*;
(
  input  line_t             line_i,
  input  logic              zero_ok_i,
  input  logic              rep_ok_i,
  input  logic              d1_ok_i,
  input  logic [NDELTA-1:0] d1_sign_i,
  input  logic [WORD_W+NDELTA*8-1:0]  d1_body_i,
  input  logic              d2_ok_i,
  input  logic [NDELTA-1:0] d2_sign_i,
  input  logic [WORD_W+NDELTA*16-1:0] d2_body_i,
  output enc_t              enc_o,
  output logic [NDELTA-1:0] sign_o,
  output body_t             body_o,
  output logic [2:0]        nflits_o
);

  always_comb begin
    body_o = '0;
    sign_o = '0;
    if (zero_ok_i) begin
      enc_o = ENC_ZERO;
    end else if (rep_ok_i) begin
      enc_o = ENC_REP;
      body_o[WORD_W-1:0] = line_i[0];
    end else if (d1_ok_i) begin
      enc_o  = ENC_B4D1;
      sign_o = d1_sign_i;
      body_o[$bits(d1_body_i)-1:0] = d1_body_i;
    end else if (d2_ok_i) begin
      enc_o  = ENC_B4D2;
      sign_o = d2_sign_i;
      body_o[$bits(d2_body_i)-1:0] = d2_body_i;
    end else begin
      enc_o  = ENC_NONE;
      body_o = line_i;
    end
    nflits_o = packet_flits(enc_o, 1'b1);
  end

endmodule
