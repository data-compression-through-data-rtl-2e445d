// tb_repeat_comp -- self-checking test of repeat_comp.
// Lines with four equal words (random value and zero) must be flagged; lines where
// any one word differs from B0 in any one bit, and random lines, must not.
module tb_repeat_comp;
  import noc_comp_pkg::*;

  line_t line;
  logic  ok;
  int    checks = 0, failures = 0;

  repeat_comp dut (.line_i(line), .ok_o(ok));

  task automatic check(line_t l, logic exp);
    line = l;
    #1;
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
    word_t v;
    int    bitpos;
    check('0, 1'b1);
    for (int n = 0; n < 100; n++) begin
      v = $urandom;
      l = {v, v, v, v};
      check(l, 1'b1);
      for (int w = 0; w < LINE_WORDS; w++) begin
        l = {v, v, v, v};
        bitpos = $urandom_range(31, 0);
        l[w][bitpos] = ~l[w][bitpos];
        check(l, 1'b0);
      end
    end
    for (int n = 0; n < 100; n++) begin
      for (int w = 0; w < LINE_WORDS; w++) l[w] = $urandom;
      check(l, (l[1] == l[0]) && (l[2] == l[0]) && (l[3] == l[0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
