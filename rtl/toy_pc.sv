// toy_pc: the TOY program counter with its incrementer and input mux.
//
// The 8-bit PC register feeds an adder that forms pc + 1.  A two-way mux
// picks the next value: input 0 is pc + 1, input 1 is the jump or branch
// target; the machine drives the mux select with the execute phase, so the
// PC steps by one at the end of fetch and takes a target at the end of
// execute.  The register loads only when 'load' is set at the rising clock
// edge.  All of this follows the design; the synchronous active-low reset
// to address 0x10 is this implementation's choice (TOY programs
// conventionally start there), set by the START parameter.
//
// Interface: clk, rst_n; load; sel (1 = target, 0 = pc + 1); target (8
// bits); pc (8 bits).  The adder wraps from 0xFF to 0x00.
module toy_pc
  import toy_pkg::*;
#(
  parameter int unsigned AW    = ADDR_W,   // PC width
  parameter logic [AW-1:0] START = 'h10    // PC value after reset
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic          sel,
  input  logic [AW-1:0] target,
  output logic [AW-1:0] pc
);

  logic [AW-1:0] pc_plus1, pc_next;

  assign pc_plus1 = pc + 1'b1;
  assign pc_next  = sel ? target : pc_plus1;

  always_ff @(posedge clk) begin
    if (!rst_n)
      pc <= START;
    else if (load)
      pc <= pc_next;
  end

endmodule
