// tb_zero_comp -- self-checking test of zero_comp.
// Drives all-zero lines, lines with a single set bit in each word position and
// random lines; the expected flag is computed word by word in the testbench.
module tb_zero_comp;
  import noc_comp_pkg::*;

  line_t line;
  logic  ok;
  int    checks = 0, failures = 0;

  zero_comp dut (.line_i(line), .ok_o(ok));

  task automatic check(line_t l);
    logic exp;
    line = l;
    #1;
    exp = 1'b1;
    for (int i = 0; i < LINE_WORDS; i++) if (l[i] != 0) exp = 1'b0;
    checks++;
    if (ok !== exp) begin
      failures++;
      $display("FAIL line=%h ok=%b exp=%b", l, ok, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    line_t l;
    check('0);
    for (int w = 0; w < LINE_WORDS; w++)
      for (int b = 0; b < WORD_W; b++) begin
        l = '0;
        l[w][b] = 1'b1;
        check(l);
      end
    for (int n = 0; n < 200; n++) begin
      for (int w = 0; w < LINE_WORDS; w++) l[w] = $urandom;
      check(l);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
