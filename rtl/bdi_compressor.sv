// bdi_compressor -- compression unit of the network interface (injection side).
//
// The line arriving from the L2 bank is handed to four compression units working in
// parallel -- zero, repeat value, base 4 / delta 1 and base 4 / delta 2 -- and a
// priority mux picks the smallest result; no compression is the fallback. The output
// is the header encoding, the delta sign bits, the packed body and the resulting
// packet length in flits (1..5). Fully combinational, so the result is ready in
// the cycle the line is presented; the caller registers it.
// The set of units and their parallel organisation follow the design description.
module bdi_compressor
  import noc_comp_pkg::*;
(
  input  line_t             line_i,
  output enc_t              enc_o,
  output logic [NDELTA-1:0] sign_o,
  output body_t             body_o,
  output logic [2:0]        nflits_o
);

  logic                         zero_ok, rep_ok, d1_ok, d2_ok;
  logic [NDELTA-1:0]            d1_sign, d2_sign;
  logic [WORD_W+NDELTA*8-1:0]   d1_body;
  logic [WORD_W+NDELTA*16-1:0]  d2_body;

  zero_comp u_zero (.line_i, .ok_o(zero_ok));
  repeat_comp u_rep (.line_i, .ok_o(rep_ok));
  delta_comp #(.DELTA_BYTES(1)) u_b4d1 (.line_i, .ok_o(d1_ok), .sign_o(d1_sign), .body_o(d1_body));
  delta_comp #(.DELTA_BYTES(2)) u_b4d2 (.line_i, .ok_o(d2_ok), .sign_o(d2_sign), .body_o(d2_body));

  comp_priority_mux u_mux (
    .line_i,
    .zero_ok_i(zero_ok), .rep_ok_i(rep_ok),
    .d1_ok_i(d1_ok), .d1_sign_i(d1_sign), .d1_body_i(d1_body),
    .d2_ok_i(d2_ok), .d2_sign_i(d2_sign), .d2_body_i(d2_body),
    .enc_o, .sign_o, .body_o, .nflits_o
  );

endmodule
