// toy_cond_eval_tb: self-checking test of the branch condition evaluator.
// Checks eq0 and gt0 for 0, 1, the largest positive word, negative words
// and random words, reading words as 16-bit two's complement.
module toy_cond_eval_tb;
  import toy_pkg::*;

  word_t a;
  logic  eq0, gt0;
  int checks = 0, failures = 0;

  toy_cond_eval dut (.*);

  task automatic check(input word_t v);
    int sv;
    a = v;
    #1;
    sv = int'(v) - ((v >= 16'h8000) ? 65536 : 0);
    checks++;
    if (eq0 !== (sv == 0) || gt0 !== (sv > 0)) begin
      failures++;
      $display("FAIL a=%h eq0=%b gt0=%b", v, eq0, gt0);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'h0000); check(16'h0001); check(16'h7FFF);
    check(16'h8000); check(16'hFFFF); check(16'h0100);
    for (int i = 0; i < 500; i++) check(word_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
