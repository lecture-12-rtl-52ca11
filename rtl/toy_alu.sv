// toy_alu: the TOY arithmetic logic unit, one big combinational circuit.
//
// Five function units work on the two 16-bit inputs in parallel and a 3-bit
// select picks one of them: 000 add/subtract, 001 and, 010 xor, 011 shift,
// 100 copy input 2 (used to pass a register value to the memory address or
// the PC).  Subtraction uses the same adder: when 'subtract' is set, input 2
// is inverted and the carry-in is 1, giving in1 + ~in2 + 1 = in1 - in2.
// These structures follow the design.  This implementation's own choices:
// the shift amount is the whole of input 2 taken as an unsigned number, so
// shifting by 16 or more empties the word; shift right is arithmetic
// (copies the sign bit), as the machine's words are two's complement; the
// shift direction wire is 0 for left and 1 for right; unused select codes
// 101..111 give 0.
//
// Interface: in1, in2 (16 bits), alu_sel (3 bits), subtract, shift_dir;
// result (16 bits).  Purely combinational, no clock.
module toy_alu
  import toy_pkg::*;
(
  input  word_t    in1,
  input  word_t    in2,
  input  alu_sel_e alu_sel,
  input  logic     subtract,
  input  shift_dir_e shift_dir,
  output word_t    result
);

  word_t in2_eff;   // input 2 or its complement
  word_t sum;
  word_t shifted;

  always_comb begin
    in2_eff = subtract ? ~in2 : in2;
    sum     = in1 + in2_eff + word_t'(subtract);   // subtract drives carry-in
    if (shift_dir == SHIFT_RIGHT)
      shifted = word_t'($signed(in1) >>> in2);
    else
      shifted = in1 << in2;
  end

  always_comb begin
    unique case (alu_sel)
      ALU_ADDSUB: result = sum;
      ALU_AND:    result = in1 & in2;
      ALU_XOR:    result = in1 ^ in2;
      ALU_SHIFT:  result = shifted;
      ALU_COPY2:  result = in2;
      default:    result = '0;
    endcase
  end

endmodule
