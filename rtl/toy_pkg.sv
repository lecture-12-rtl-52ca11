// toy_pkg: shared widths, instruction encodings and control types of the TOY
// processor.
//
// The TOY machine has 16-bit words, 256 words of main memory, 16 registers,
// an 8-bit program counter and 16 instruction types selected by the top hex
// digit of the instruction word.  The opcode numbering and the 3-bit ALU
// select codes below are the ones the design defines; the encodings of the
// two-bit register write-data select and of the shift-direction wire are
// choices of this implementation.
package toy_pkg;

  localparam int unsigned WORD_W = 16;  // data word width
  localparam int unsigned ADDR_W = 8;   // memory address and PC width
  localparam int unsigned REG_AW = 4;   // register address width (16 registers)

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [REG_AW-1:0] reg_addr_t;

  // Instruction types, hex digit 15..12 of the instruction word.
  typedef enum logic [3:0] {
    OP_HALT  = 4'h0,  // halt
    OP_ADD   = 4'h1,  // R[d] <- R[s] + R[t]
    OP_SUB   = 4'h2,  // R[d] <- R[s] - R[t]
    OP_AND   = 4'h3,  // R[d] <- R[s] & R[t]
    OP_XOR   = 4'h4,  // R[d] <- R[s] ^ R[t]
    OP_SHL   = 4'h5,  // R[d] <- R[s] << R[t]
    OP_SHR   = 4'h6,  // R[d] <- R[s] >> R[t]
    OP_LDA   = 4'h7,  // load address:   R[d] <- addr
    OP_LD    = 4'h8,  // load:           R[d] <- mem[addr]
    OP_ST    = 4'h9,  // store:          mem[addr] <- R[d]
    OP_LDI   = 4'hA,  // load indirect:  R[d] <- mem[R[t]]
    OP_STI   = 4'hB,  // store indirect: mem[R[t]] <- R[d]
    OP_BZ    = 4'hC,  // branch zero:     if (R[d] == 0) pc <- addr
    OP_BP    = 4'hD,  // branch positive: if (R[d] >  0) pc <- addr
    OP_JR    = 4'hE,  // jump register:  pc <- R[t]
    OP_JAL   = 4'hF   // jump and link:  R[d] <- pc; pc <- addr
  } opcode_e;

  // ALU select, from the ALU op table.
  typedef enum logic [2:0] {
    ALU_ADDSUB = 3'b000,
    ALU_AND    = 3'b001,
    ALU_XOR    = 3'b010,
    ALU_SHIFT  = 3'b011,
    ALU_COPY2  = 3'b100
  } alu_sel_e;

  // Shift-direction wire of the ALU.
  typedef enum logic {
    SHIFT_LEFT  = 1'b0,
    SHIFT_RIGHT = 1'b1
  } shift_dir_e;

  // Two-bit select of the register write-data mux.
  typedef enum logic [1:0] {
    WD_RESULT = 2'd0,  // result of arithmetic, logic, or addr for load addr
    WD_LOAD   = 2'd1,  // memory read data
    WD_PC     = 2'd2   // pc, zero-extended, for jump and link
  } wd_sel_e;

  // Control wires produced by toy_control for one clock cycle.
  typedef struct packed {
    logic     write_ir;    // load IR from memory read data
    logic     write_mem;   // write memory at the clock edge
    logic     write_reg;   // write register R[d] at the clock edge
    logic     load_pc;     // load PC at the clock edge
    logic     pc_mux;      // PC input: 1 = jump/branch target, 0 = pc + 1
    logic     mem_addr_mux;// memory address: 1 = addr bus, 0 = pc
    logic     reg_a_mux;   // register A address: 1 = d, 0 = s
    logic     alu_mux;     // result bus: 1 = addr field, 0 = ALU output
    alu_sel_e alu_sel;     // ALU function
    logic     subtract;    // ALU subtract wire
    shift_dir_e shift_dir; // ALU shift direction wire
    wd_sel_e  wd_sel;      // register write-data mux
  } ctrl_t;

endpackage
