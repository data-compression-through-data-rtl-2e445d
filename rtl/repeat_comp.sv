// repeat_comp -- "Repeat value" compression unit (encoding 001, priority 2).
//
// Flags a cache line whose four 32-bit words all hold the same value. Such a line
// is sent as the header plus one body flit holding that value (B0). The unit
// compares B1..B3 with B0 in parallel; it is combinational, so the flag is valid in
// the cycle the line is presented. An all-zero line also matches; the priority mux
// downstream prefers the zero encoding for it.
module repeat_comp
  import noc_comp_pkg::*;
(
  input  line_t line_i,   // uncompressed line, line_i[0] = B0
  output logic  ok_o      // 1: B1..B3 equal B0
);

  logic [NDELTA-1:0] same;

  always_comb begin
    for (int i = 0; i < NDELTA; i++) same[i] = (line_i[i+1] == line_i[0]);
    ok_o = &same;
  end

endmodule
