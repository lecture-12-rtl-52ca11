// toy_cpu: the TOY processor, a two-cycle (fetch, execute) 16-bit machine.
//
// Datapath: the PC addresses main memory during fetch; the word read is
// captured in the IR at the end of fetch while the PC steps to pc + 1.
// During execute the IR fields address the register file: W Addr = d,
// A Addr = s or d (reg_a_mux), B Addr = t.  A data and B data feed the ALU;
// a mux after the ALU puts either the ALU output or the zero-extended 8-bit
// addr field on the 16-bit result bus.  The result bus is, at once, the
// register write data ("result of arithmetic, logic, or addr for load
// addr"), the memory address for loads and stores (low 8 bits) and the
// jump/branch target of the PC (low 8 bits).  The register write data mux
// chooses between the result bus, the memory read data (load) and the
// zero-extended PC (jump and link).  Memory write data is register A data
// (store).  A data also feeds the condition evaluator for the branches.
// All of these connections follow the design's datapath; the control
// wires come from toy_control and the phase from toy_phase_counter.
//
// Timing: every instruction takes exactly two clock cycles; state (PC, IR,
// registers, memory) changes only at rising clock edges.  A halt
// instruction stops the machine until reset.
//
// Added by this implementation for use as a component: a synchronous
// active-low reset (PC = 0x10, registers and IR = 0, fetch phase) and a
// second memory port (ext_*) to load programs and read results; it should
// be used while the machine is in reset or halted.
//
// Interface: clk, rst_n; ext_we, ext_addr, ext_wdata, ext_rdata; pc, ir,
// execute (1 in the execute phase), halted.
module toy_cpu
  import toy_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ext_we,
  input  addr_t ext_addr,
  input  word_t ext_wdata,
  output word_t ext_rdata,
  output addr_t pc,
  output word_t ir,
  output logic  execute,
  output logic  halted
);

  ctrl_t     ctrl;
  logic      fetch, run, eq0, gt0;
  addr_t     mem_addr;
  word_t     mem_rdata, a_data, b_data, alu_out, result, reg_wdata;
  opcode_e   op;
  reg_addr_t d, s, t, a_addr;
  addr_t     addr;

  toy_phase_counter u_phase (
    .clk, .rst_n, .run, .fetch, .execute
  );

  toy_control u_ctrl (
    .clk, .rst_n, .op, .fetch, .execute, .eq0, .gt0, .ctrl, .run, .halted
  );

  toy_pc u_pc (
    .clk, .rst_n,
    .load     (ctrl.load_pc),
    .sel      (ctrl.pc_mux),
    .target   (result[ADDR_W-1:0]),   // pc for branch, jump
    .pc
  );

  // Memory address: pc during fetch, addr for loads and stores in execute.
  assign mem_addr = ctrl.mem_addr_mux ? result[ADDR_W-1:0] : pc;

  toy_memory u_mem (
    .clk,
    .addr       (mem_addr),
    .write      (ctrl.write_mem),
    .write_data (a_data),             // store data
    .read_data  (mem_rdata),
    .ext_we, .ext_addr, .ext_wdata, .ext_rdata
  );

  toy_ir u_ir (
    .clk, .rst_n,
    .load (ctrl.write_ir),
    .din  (mem_rdata),
    .ir, .op, .d, .s, .t, .addr
  );

  assign a_addr = ctrl.reg_a_mux ? d : s;

  always_comb begin
    unique case (ctrl.wd_sel)
      WD_LOAD: reg_wdata = mem_rdata;
      WD_PC:   reg_wdata = word_t'(pc);   // pc for jal, zero-extended
      default: reg_wdata = result;
    endcase
  end

  toy_regfile u_rf (
    .clk, .rst_n,
    .a_addr,
    .b_addr (t),
    .w_addr (d),
    .w_data (reg_wdata),
    .write  (ctrl.write_reg),
    .a_data,
    .b_data
  );

  toy_alu u_alu (
    .in1       (a_data),
    .in2       (b_data),
    .alu_sel   (ctrl.alu_sel),
    .subtract  (ctrl.subtract),
    .shift_dir (ctrl.shift_dir),
    .result    (alu_out)
  );

  toy_cond_eval u_cond (
    .a (a_data), .eq0, .gt0
  );

  // Result bus: ALU output, or the addr field zero-extended to 16 bits.
  assign result = ctrl.alu_mux ? word_t'(addr) : alu_out;

endmodule
