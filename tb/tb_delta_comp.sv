// tb_delta_comp -- self-checking test of delta_comp with 1-byte and 2-byte deltas.
// Lines are drawn with differences near the +-255/+-256 and +-65535/+-65536 limits,
// around the 2^32 wrap-around, and at random. The expected fit flag, sign bits and
// body are computed by tb_ref_pkg with signed 64-bit arithmetic.
module tb_delta_comp;
  import noc_comp_pkg::*;
  import tb_ref_pkg::*;

  line_t               line;
  logic                ok1, ok2;
  logic [2:0]          s1, s2;
  logic [32+3*8-1:0]   b1;
  logic [32+3*16-1:0]  b2;
  int                  checks = 0, failures = 0;
  int                  n_fit1 = 0, n_fit2 = 0;

  delta_comp #(.DELTA_BYTES(1)) dut1 (.line_i(line), .ok_o(ok1), .sign_o(s1), .body_o(b1));
  delta_comp #(.DELTA_BYTES(2)) dut2 (.line_i(line), .ok_o(ok2), .sign_o(s2), .body_o(b2));

  task automatic expect_eq(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s line=%h got=%h exp=%h", what, line, got, exp);
    end
  endtask

  task automatic check_width(int db, logic ok, logic [2:0] s, logic [127:0] body);
    bit     e_ok;
    longint d;
    logic [2:0]   e_s;
    logic [127:0] e_b;
    e_ok = fits(line, db);
    expect_eq($sformatf("ok%0d", db), 128'(ok), 128'(e_ok));
    if (e_ok) begin
      e_b = '0;
      e_b[31:0] = line[0];
      for (int i = 1; i < 4; i++) begin
        d = sdiff(line[i], line[0]);
        e_s[i-1] = (d < 0);
        if (d < 0) d = -d;
        for (int b = 0; b < 8 * db; b++) e_b[32 + (i-1)*8*db + b] = d[b];
      end
      expect_eq($sformatf("sign%0d", db), 128'(s), 128'(e_s));
      expect_eq($sformatf("body%0d", db), body, e_b);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      line = gen_line(n % 5);
      #1;
      check_width(1, ok1, s1, 128'(b1));
      check_width(2, ok2, s2, 128'(b2));
      n_fit1 += int'(ok1);
      n_fit2 += int'(ok2);
    end
    // both outcomes of each width must have been exercised
    checks++;
    if (n_fit1 == 0 || n_fit2 == n_fit1) begin
      failures++;
      $display("FAIL coverage fit1=%0d fit2=%0d", n_fit1, n_fit2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
