// delta_comp -- base-plus-delta compression unit (B4D1 / B4D2 of the encoding list).
//
// The first word B0 of the line is the base. N-1 = 3 subtractors form
// Bi - B0 (i = 1..3) modulo 2^32. Each difference is turned into a sign bit and a
// magnitude; the line is compressible when every magnitude fits in DELTA_BYTES
// bytes, i.e. its upper bits are a pure sign extension. The sign bits go to the
// packet header, where they pick add or subtract in the decompressor; the body
// carries B0 followed by the three magnitudes, DELTA_BYTES each (DELTA_BYTES=1 gives
// 7 body bytes, DELTA_BYTES=2 gives 10).
// Interface: line in, ok / sign / body out. Combinational, no clock.
// The subtractor structure, base choice and body order follow the design
// description; the sign-and-magnitude form of the delta is this design's reading of
// its add/subtract decoder.
module delta_comp
  import noc_comp_pkg::*;
#(
  parameter int unsigned DELTA_BYTES = 1   // 1: B4D1, 2: B4D2
) (
  input  line_t                                   line_i,
  output logic                                    ok_o,    // all deltas fit
  output logic [NDELTA-1:0]                       sign_o,  // 1: Bi < B0 (subtract on decode)
  output logic [WORD_W+NDELTA*DELTA_BYTES*8-1:0]  body_o   // {d2, d1, d0, B0}, B0 in LSBs
);

  localparam int unsigned DW = DELTA_BYTES * 8;

  word_t             diff [NDELTA];
  word_t             mag  [NDELTA];
  logic [NDELTA-1:0] fits;

  always_comb begin
    body_o[WORD_W-1:0] = line_i[0];
    for (int i = 0; i < NDELTA; i++) begin
      diff[i]   = line_i[i+1] - line_i[0];
      sign_o[i] = diff[i][WORD_W-1];
      mag[i]    = sign_o[i] ? (~diff[i] + 1'b1) : diff[i];
      // magnitude must fit in DW bits: all higher bits zero
      fits[i]   = (mag[i] >> DW) == '0;
      body_o[WORD_W + i*DW +: DW] = mag[i][DW-1:0];
    end
    ok_o = &fits;
  end

endmodule
