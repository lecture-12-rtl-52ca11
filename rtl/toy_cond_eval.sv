// toy_cond_eval: condition evaluator for the TOY branch instructions.
//
// Looks at the register A data word and raises 'eq0' when it is zero and
// 'gt0' when it is greater than zero.  The two outputs are the design's; the
// design does not say how words are signed, and this implementation reads
// them as 16-bit two's complement, so 0x8000..0xFFFF are negative and give
// gt0 = 0.
//
// Interface: a (16 bits) in; eq0, gt0 out.  Combinational.
module toy_cond_eval
  import toy_pkg::*;
(
  input  word_t a,
  output logic  eq0,
  output logic  gt0
);

  assign eq0 = (a == '0);
  assign gt0 = !a[WORD_W-1] && (a != '0);

endmodule
