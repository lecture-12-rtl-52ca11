// toy_control: control unit of the two-cycle TOY processor.
//
// A 4-bit decoder turns the opcode into one line per instruction type, and
// each control wire is an OR of the instruction lines that need it, gated
// with the fetch/execute phase and the branch conditions.  The clock's part
// in the design's gating ("write only at the very end of the execute
// phase") becomes the rising edge at which the enables below are sampled by
// the PC, IR, memory and register file.
//
// Terms that follow the design:
//   write_ir  = fetch
//   write_mem = store | store indirect                       (execute only)
//   alu_sel0  = and | shift left | shift right
//   alu_mux   = load addr | load | store | branch zero | branch pos | jump+link
//   reg_a_mux = store | store indirect | branch zero | branch pos
//   pc_mux    = execute
//   load_pc   = fetch | jump+link | jump reg | (>0 & branch pos) | (=0 & branch zero)
// Terms this implementation completes from the ALU op table and the
// instruction meanings: alu_sel1 = xor | shifts, alu_sel2 = load indirect |
// store indirect | jump reg (copy input 2), subtract = subtract,
// shift_dir = shift right, the register write enable (execute phase of add
// through load indirect and jump+link), the register write-data select, and
// the memory address select (pc in fetch, addr bus in execute).
//
// Halt: when a halt instruction executes, a 'halted' flag is set at the
// end of its execute phase; from then on every enable is held low and the
// phase counter is frozen (run = 0), until reset.  The design only names
// halt; this behaviour is this implementation's.
//
// Interface: clk, rst_n; op (4 bits), fetch, execute, eq0, gt0 in; ctrl
// (ctrl_t), run, halted out.  All outputs except 'halted' are combinational.
module toy_control
  import toy_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  opcode_e op,
  input  logic    fetch,
  input  logic    execute,
  input  logic    eq0,
  input  logic    gt0,
  output ctrl_t   ctrl,
  output logic    run,
  output logic    halted
);

  // One-hot instruction lines of the 4-bit decoder.
  logic [15:0] dec;
  assign dec = 16'(1) << op;

  logic is_halt, is_add, is_sub, is_and, is_xor, is_shl, is_shr, is_lda;
  logic is_ld, is_st, is_ldi, is_sti, is_bz, is_bp, is_jr, is_jal;
  assign {is_jal, is_jr, is_bp, is_bz, is_sti, is_ldi, is_st, is_ld,
          is_lda, is_shr, is_shl, is_xor, is_and, is_sub, is_add, is_halt} = dec;

  logic halt_exec;   // a halt instruction is in its execute phase
  assign halt_exec = !halted && execute && is_halt;

  always_comb begin
    ctrl = '0;
    if (!halted) begin
      ctrl.write_ir     = fetch;
      ctrl.write_mem    = execute & (is_st | is_sti);
      ctrl.write_reg    = execute & (is_add | is_sub | is_and | is_xor | is_shl |
                                     is_shr | is_lda | is_ld | is_ldi | is_jal);
      ctrl.load_pc      = fetch | is_jal | is_jr | (gt0 & is_bp) | (eq0 & is_bz);
      ctrl.pc_mux       = execute;
      ctrl.mem_addr_mux = execute;
      ctrl.reg_a_mux    = is_st | is_sti | is_bz | is_bp;
      ctrl.alu_mux      = is_lda | is_ld | is_st | is_bz | is_bp | is_jal;
      ctrl.alu_sel      = alu_sel_e'({is_ldi | is_sti | is_jr,
                                      is_xor | is_shl | is_shr,
                                      is_and | is_shl | is_shr});
      ctrl.subtract     = is_sub;
      ctrl.shift_dir    = is_shr ? SHIFT_RIGHT : SHIFT_LEFT;
      ctrl.wd_sel       = (is_ld | is_ldi) ? WD_LOAD : (is_jal ? WD_PC : WD_RESULT);
    end else begin
      ctrl.alu_sel = ALU_ADDSUB;
      ctrl.wd_sel  = WD_RESULT;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)
      halted <= 1'b0;
    else if (halt_exec)
      halted <= 1'b1;
  end

  assign run = !halted;

  // Rules of the two-phase scheme: state is written only in the phase that
  // owns it, and the phases are exclusive.
  a_phase_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    fetch != execute);
  a_write_in_execute: assert property (@(posedge clk) disable iff (!rst_n)
    (ctrl.write_mem || ctrl.write_reg) |-> execute);
  a_ir_in_fetch: assert property (@(posedge clk) disable iff (!rst_n)
    ctrl.write_ir |-> fetch);

endmodule
