// tb_comp_priority_mux -- self-checking test of comp_priority_mux.
// All 16 combinations of the four "compressible" flags are driven with random
// candidate bodies; the expected encoding, sign bits, body and flit count follow the
// priority order Zero > Repeat > B4D1 > B4D2 > None and the packet lengths 1..5.
module tb_comp_priority_mux;
  import noc_comp_pkg::*;

  line_t        line;
  logic         zok, rok, d1ok, d2ok;
  logic [2:0]   d1s, d2s, sign;
  logic [55:0]  d1b;
  logic [79:0]  d2b;
  enc_t         enc;
  body_t        body;
  logic [2:0]   nfl;
  int           checks = 0, failures = 0;

  comp_priority_mux dut (
    .line_i(line), .zero_ok_i(zok), .rep_ok_i(rok),
    .d1_ok_i(d1ok), .d1_sign_i(d1s), .d1_body_i(d1b),
    .d2_ok_i(d2ok), .d2_sign_i(d2s), .d2_body_i(d2b),
    .enc_o(enc), .sign_o(sign), .body_o(body), .nflits_o(nfl));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0]   e_enc, e_sign;
    logic [127:0] e_body;
    int           e_n;
    for (int rep = 0; rep < 20; rep++) begin
      for (int f = 0; f < 16; f++) begin
        {d2ok, d1ok, rok, zok} = 4'(f);
        for (int w = 0; w < 4; w++) line[w] = $urandom;
        d1s = 3'($urandom); d2s = 3'($urandom);
        d1b = {$urandom, $urandom};
        d2b = {$urandom, $urandom, $urandom};
        #1;
        if (zok)       begin e_enc = 3'b000; e_sign = 0;   e_body = 0;               e_n = 1; end
        else if (rok)  begin e_enc = 3'b001; e_sign = 0;   e_body = 128'(line[0]);   e_n = 2; end
        else if (d1ok) begin e_enc = 3'b010; e_sign = d1s; e_body = 128'(d1b);       e_n = 3; end
        else if (d2ok) begin e_enc = 3'b011; e_sign = d2s; e_body = 128'(d2b);       e_n = 4; end
        else           begin e_enc = 3'b111; e_sign = 0;   e_body = line;            e_n = 5; end
        checks++;
        if (enc !== e_enc || sign !== e_sign || body !== e_body || int'(nfl) != e_n) begin
          failures++;
          $display("FAIL flags=%b enc=%b/%b sign=%b/%b n=%0d/%0d", f[3:0], enc, e_enc,
                   sign, e_sign, nfl, e_n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
