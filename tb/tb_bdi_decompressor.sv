// tb_bdi_decompressor -- self-checking test of the parallel decompression unit.
// Packets are built by the reference encoder of tb_ref_pkg from lines of every class;
// the unit must give back the original line for each encoding. Unused codes
// (100, 101, 110) must be treated as uncompressed.
module tb_bdi_decompressor;
  import noc_comp_pkg::*;
  import tb_ref_pkg::*;

  enc_t       enc;
  logic [2:0] sign;
  body_t      body;
  line_t      line;
  int         checks = 0, failures = 0;
  int         seen [8];

  bdi_decompressor dut (.enc_i(enc), .sign_i(sign), .body_i(body), .line_o(line));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_t  r;
    line_t l;
    foreach (seen[i]) seen[i] = 0;
    for (int n = 0; n < 3000; n++) begin
      l = gen_line(n % 5);
      r = ref_compress(l);
      enc = r.enc; sign = r.sign; body = r.body;
      // bytes past the end of a short body are not sent; fill them with noise
      for (int b = 8 * body_bytes(r.enc); b < 128; b++) body[b] = 1'($urandom);
      #1;
      seen[r.enc]++;
      checks++;
      if (line !== l) begin
        failures++;
        $display("FAIL enc=%b got=%h exp=%h", enc, line, l);
      end
    end
    for (int c = 4; c < 7; c++) begin
      enc = enc_t'(c);
      body = {$urandom, $urandom, $urandom, $urandom};
      #1;
      checks++;
      if (line !== body) begin
        failures++;
        $display("FAIL unused code %0d", c);
      end
    end
    foreach (seen[i]) if (i inside {0, 1, 2, 3, 7}) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL encoding %0d unused", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
