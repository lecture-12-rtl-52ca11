// toy_memory: TOY main memory, 256 words of 16 bits.
//
// One address input selects the word that appears on read_data at all
// times (a combinational read, so the instruction word is ready within the
// fetch phase); when 'write' is set the word on write_data is stored at the
// rising clock edge.  The size, the single address and the Write/Cl inputs
// follow the design.  This implementation adds a second, independent
// port (ext_we/ext_addr/ext_wdata/ext_rdata) through which a program is
// loaded and results read back; a write on the main port wins if both write
// the same word in one cycle.  The memory is not cleared by reset: a program
// loader writes every word it uses.
//
// Interface: clk; addr (8 bits), write, write_data, read_data (16 bits);
// ext_we, ext_addr, ext_wdata, ext_rdata.  Writes take effect at the clock
// edge, reads are immediate.
module toy_memory
  import toy_pkg::*;
#(
  parameter int unsigned AW = ADDR_W,   // address width (256 words)
  parameter int unsigned DW = WORD_W    // word width
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          write,
  input  logic [DW-1:0] write_data,
  output logic [DW-1:0] read_data,
  input  logic          ext_we,
  input  logic [AW-1:0] ext_addr,
  input  logic [DW-1:0] ext_wdata,
  output logic [DW-1:0] ext_rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (ext_we)
      mem[ext_addr] <= ext_wdata;
    if (write)
      mem[addr] <= write_data;
  end

  assign read_data = mem[addr];
  assign ext_rdata = mem[ext_addr];

endmodule
