// tb_bdi_compressor -- self-checking test of the parallel compression unit.
// Lines of every class (zero, repeat, 1-byte deltas, 2-byte deltas, random) are
// compressed and the encoding, sign bits, body and packet length are compared with
// the reference encoder of tb_ref_pkg. Every encoding must be produced at least once.
module tb_bdi_compressor;
  import noc_comp_pkg::*;
  import tb_ref_pkg::*;

  line_t      line;
  enc_t       enc;
  logic [2:0] sign, nfl;
  body_t      body;
  int         checks = 0, failures = 0;
  int         seen [8];

  bdi_compressor dut (.line_i(line), .enc_o(enc), .sign_o(sign), .body_o(body), .nflits_o(nfl));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_t r;
    foreach (seen[i]) seen[i] = 0;
    for (int n = 0; n < 3000; n++) begin
      line = gen_line(n % 5);
      #1;
      r = ref_compress(line);
      checks++;
      if (enc !== r.enc || sign !== r.sign || body !== r.body || int'(nfl) != r.nflits) begin
        failures++;
        $display("FAIL line=%h enc=%b/%b sign=%b/%b n=%0d/%0d", line, enc, r.enc, sign,
                 r.sign, nfl, r.nflits);
      end
      seen[enc]++;
    end
    foreach (seen[i]) begin
      if (i == 0 || i == 1 || i == 2 || i == 3 || i == 7) begin
        checks++;
        if (seen[i] == 0) begin
          failures++;
          $display("FAIL encoding %0d never produced", i);
        end
      end
    end
    $display("encodings zero=%0d rep=%0d b4d1=%0d b4d2=%0d none=%0d",
             seen[0], seen[1], seen[2], seen[3], seen[7]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
