// toy_regfile: the TOY register file, 16 registers of 16 bits.
//
// Two read ports and one write port let an instruction read two registers
// and write a third in the same instruction (R1 <- R2 + R3): three address
// inputs, one data input, two data outputs.  Reads are combinational; the
// write happens at the rising clock edge when 'write' is set.  This follows
// the design.  Choices of this implementation: register 0 always reads as
// zero and writes to it are dropped (the usual TOY convention), and reset
// clears all registers.
//
// Interface: clk, rst_n (active-low, synchronous); a_addr, b_addr, w_addr
// (4 bits); w_data (16 bits); write; a_data, b_data (16 bits).
module toy_regfile
  import toy_pkg::*;
#(
  parameter int unsigned AW = REG_AW,   // register address width (16 registers)
  parameter int unsigned DW = WORD_W    // register width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] a_addr,
  input  logic [AW-1:0] b_addr,
  input  logic [AW-1:0] w_addr,
  input  logic [DW-1:0] w_data,
  input  logic          write,
  output logic [DW-1:0] a_data,
  output logic [DW-1:0] b_data
);

  logic [DW-1:0] regs [2**AW];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 2**AW; i++)
        regs[i] <= '0;
    end else if (write && w_addr != '0) begin
      regs[w_addr] <= w_data;
    end
  end

  assign a_data = (a_addr == '0) ? '0 : regs[a_addr];
  assign b_data = (b_addr == '0) ? '0 : regs[b_addr];

endmodule
