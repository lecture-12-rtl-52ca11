// toy_alu_tb: self-checking test of the TOY ALU.
//
// Applies the worked example (0x0028 + 0x0064 = 0x008C), edge cases and
// 2000 random operand pairs to every ALU function and compares the output
// with results computed here from the operation's definition: add,
// subtract as a - b, and, xor, logical shift left, arithmetic shift right,
// copy of input 2.
module toy_alu_tb;
  import toy_pkg::*;

  word_t    in1, in2, result;
  alu_sel_e alu_sel;
  logic     subtract;
  shift_dir_e shift_dir;
  int checks = 0, failures = 0;

  toy_alu dut (.*);

  task automatic check(input alu_sel_e sel, input logic sub, input logic dir,
                       input word_t a, input word_t b, input word_t exp);
    alu_sel = sel; subtract = sub; shift_dir = shift_dir_e'(dir); in1 = a; in2 = b;
    #1;
    checks++;
    if (result !== exp) begin
      failures++;
      $display("FAIL sel=%0d sub=%0b dir=%0b a=%h b=%h got=%h exp=%h",
               sel, sub, dir, a, b, result, exp);
    end
  endtask

  function automatic word_t shr_ref(word_t a, word_t b);
    word_t r = a;
    for (int i = 0; i < 32 && i < int'(b); i++)
      r = {r[15], r[15:1]};
    return r;
  endfunction

  function automatic word_t shl_ref(word_t a, word_t b);
    return (b >= 16) ? 16'h0000 : word_t'(32'(a) * (32'd1 << b));
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t a, b;
    check(ALU_ADDSUB, 1'b0, 1'b0, 16'h0028, 16'h0064, 16'h008C);
    check(ALU_ADDSUB, 1'b1, 1'b0, 16'h0028, 16'h0064, 16'hFFC4);
    check(ALU_ADDSUB, 1'b0, 1'b0, 16'hFFFF, 16'h0001, 16'h0000);
    check(ALU_SHIFT,  1'b0, SHIFT_RIGHT, 16'h8000, 16'd4, 16'hF800);
    check(ALU_SHIFT,  1'b0, SHIFT_RIGHT, 16'h4000, 16'd4, 16'h0400);
    check(ALU_SHIFT,  1'b0, SHIFT_LEFT,  16'h0003, 16'd15, 16'h8000);
    check(ALU_SHIFT,  1'b0, SHIFT_LEFT,  16'h0003, 16'd16, 16'h0000);
    check(ALU_SHIFT,  1'b0, SHIFT_RIGHT, 16'h8001, 16'd40, 16'hFFFF);
    for (int i = 0; i < 2000; i++) begin
      a = word_t'($urandom);
      b = word_t'($urandom);
      if (i % 3 == 0) b = b & 16'h001F;
      check(ALU_ADDSUB, 1'b0, 1'b0, a, b, word_t'(32'(a) + 32'(b)));
      check(ALU_ADDSUB, 1'b1, 1'b0, a, b, word_t'(32'(a) - 32'(b)));
      check(ALU_AND,    1'b0, 1'b0, a, b, a & b);
      check(ALU_XOR,    1'b0, 1'b0, a, b, a ^ b);
      check(ALU_SHIFT,  1'b0, SHIFT_LEFT,  a, b, shl_ref(a, b));
      check(ALU_SHIFT,  1'b0, SHIFT_RIGHT, a, b, shr_ref(a, b));
      check(ALU_COPY2,  1'b0, 1'b0, a, b, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
