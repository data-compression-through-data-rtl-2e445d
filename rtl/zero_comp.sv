// zero_comp -- "Zero" compression unit (encoding 000, priority 1).
//
// Looks at a whole 16-byte cache line and flags it when every word is zero. Such a
// line is sent as a header-only packet: no body flit, the encoding alone lets the
// receiver rebuild the line. Purely combinational: the flag is valid in the same
// cycle as the line. Word count follows the design description; the use of a
// single OR-reduction per word is this design's choice.
module zero_comp
  import noc_comp_pkg::*;
(
  input  line_t line_i,   // uncompressed line, line_i[0] = B0
  output logic  ok_o      // 1: all words zero, line can be sent as encoding 000
);

  logic [LINE_WORDS-1:0] word_zero;

  always_comb begin
    for (int i = 0; i < LINE_WORDS; i++) word_zero[i] = (line_i[i] == '0);
    ok_o = &word_zero;
  end

endmodule
