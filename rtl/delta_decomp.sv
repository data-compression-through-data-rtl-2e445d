// delta_decomp -- base-plus-delta decompression unit (B4D1 / B4D2).
//
// Rebuilds the 16-byte line from the 4-byte base B0 and three DELTA_BYTES-wide
// magnitudes. Each delta has an adder/subtractor: when its sign bit (from the packet
// header) is 1 the magnitude is subtracted from the base, when 0 it is added. The
// base goes straight to word 0 of the output. Combinational.
// The adder/subtractor structure and the sign-bit control follow the design
// description; the zero-extension of the magnitude to 32 bits is implied by it.
module delta_decomp
  import noc_comp_pkg::*;
#(
  parameter int unsigned DELTA_BYTES = 1   // 1: B4D1, 2: B4D2
) (
  input  logic [WORD_W+NDELTA*DELTA_BYTES*8-1:0] body_i,  // {d2, d1, d0, B0}
  input  logic [NDELTA-1:0]                      sign_i,
  output line_t                                  line_o
);

  localparam int unsigned DW = DELTA_BYTES * 8;

  word_t base;
  word_t mag [NDELTA];

  always_comb begin
    base      = body_i[WORD_W-1:0];
    line_o[0] = base;
    for (int i = 0; i < NDELTA; i++) begin
      mag[i]      = word_t'(body_i[WORD_W + i*DW +: DW]);
      line_o[i+1] = sign_i[i] ? (base - mag[i]) : (base + mag[i]);
    end
  end

endmodule
