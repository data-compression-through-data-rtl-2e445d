// tb_delta_decomp -- self-checking test of delta_decomp with 1-byte and 2-byte deltas.
// Random base words (including ones near 0 and 2^32) and random magnitudes and sign
// bits are decoded; each rebuilt word is compared with base +- magnitude computed in
// 64-bit arithmetic and reduced modulo 2^32.
module tb_delta_decomp;
  import noc_comp_pkg::*;

  logic [55:0] b1;
  logic [79:0] b2;
  logic [2:0]  s;
  line_t       l1, l2;
  int          checks = 0, failures = 0;

  delta_decomp #(.DELTA_BYTES(1)) dut1 (.body_i(b1), .sign_i(s), .line_o(l1));
  delta_decomp #(.DELTA_BYTES(2)) dut2 (.body_i(b2), .sign_i(s), .line_o(l2));

  function automatic word_t expw(word_t base, longint mag, bit neg);
    longint v;
    v = neg ? longint'(base) - mag : longint'(base) + mag;
    return word_t'(v & 64'hFFFF_FFFF);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t base;
    for (int n = 0; n < 1000; n++) begin
      base = (n % 4 == 0) ? $urandom_range(200, 0) :
             (n % 4 == 1) ? 32'hFFFF_FFFF - $urandom_range(200, 0) : $urandom;
      s  = 3'($urandom);
      b1 = {8'($urandom), 8'($urandom), 8'($urandom), base};
      b2 = {16'($urandom), 16'($urandom), 16'($urandom), base};
      #1;
      checks++;
      if (l1[0] !== base || l2[0] !== base) begin
        failures++;
        $display("FAIL base passthrough");
      end
      for (int i = 0; i < 3; i++) begin
        checks += 2;
        if (l1[i+1] !== expw(base, longint'(b1[32 + 8*i +: 8]), s[i])) begin
          failures++;
          $display("FAIL d1 word %0d base=%h got=%h", i + 1, base, l1[i+1]);
        end
        if (l2[i+1] !== expw(base, longint'(b2[32 + 16*i +: 16]), s[i])) begin
          failures++;
          $display("FAIL d2 word %0d base=%h got=%h", i + 1, base, l2[i+1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
