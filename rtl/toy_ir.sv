// toy_ir: the TOY instruction register.
//
// A 16-bit register that takes the memory read data at the rising clock
// edge when 'load' is set (the machine sets it during the fetch phase, so
// the word is captured at the very end of fetch).  Its contents are split
// into the instruction fields: op (bits 15..12), d (11..8), s (7..4),
// t (3..0), and the 8-bit addr field made of s and t together.  This
// follows the design; the synchronous reset to 0 is this implementation's
// choice.
//
// Interface: clk, rst_n; load; din (16 bits); ir, op, d, s, t, addr.
module toy_ir
  import toy_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      load,
  input  word_t     din,
  output word_t     ir,
  output opcode_e   op,
  output reg_addr_t d,
  output reg_addr_t s,
  output reg_addr_t t,
  output addr_t     addr
);

  always_ff @(posedge clk) begin
    if (!rst_n)
      ir <= '0;
    else if (load)
      ir <= din;
  end

  assign op   = opcode_e'(ir[15:12]);
  assign d    = ir[11:8];
  assign s    = ir[7:4];
  assign t    = ir[3:0];
  assign addr = ir[7:0];

endmodule
