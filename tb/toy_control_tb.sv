// toy_control_tb: self-checking test of the control unit.
// For every opcode, both phases and all four condition combinations it
// compares the control wires with a per-instruction table written here
// from what each instruction must do (which unit writes, where the PC, the
// memory address and the register write data come from, which ALU
// function).  It then checks that executing a halt sets 'halted', drops
// every enable and stops the phase counter (run = 0) until reset.
module toy_control_tb;
  import toy_pkg::*;

  logic    clk = 0, rst_n = 0;
  opcode_e op;
  logic    fetch, execute, eq0, gt0;
  ctrl_t   ctrl;
  logic    run, halted;
  int checks = 0, failures = 0;

  toy_control dut (.*);

  always #5 clk = ~clk;

  function automatic ctrl_t expected(input logic [3:0] o, input logic ex,
                                     input logic z, input logic p);
    ctrl_t c = '0;
    logic writes_reg, uses_addr, uses_d_as_a;
    c.write_ir     = !ex;
    c.pc_mux       = ex;
    c.mem_addr_mux = ex;
    // ALU function
    case (o)
      4'h2:          begin c.alu_sel = ALU_ADDSUB; c.subtract = 1; end
      4'h3:          c.alu_sel = ALU_AND;
      4'h4:          c.alu_sel = ALU_XOR;
      4'h5:          c.alu_sel = ALU_SHIFT;
      4'h6:          begin c.alu_sel = ALU_SHIFT; c.shift_dir = SHIFT_RIGHT; end
      4'hA, 4'hB, 4'hE: c.alu_sel = ALU_COPY2;
      default:       c.alu_sel = ALU_ADDSUB;
    endcase
    writes_reg  = (o >= 4'h1 && o <= 4'h8) || o == 4'hA || o == 4'hF;
    uses_addr   = o == 4'h7 || o == 4'h8 || o == 4'h9 || o == 4'hC || o == 4'hD || o == 4'hF;
    uses_d_as_a = o == 4'h9 || o == 4'hB || o == 4'hC || o == 4'hD;
    c.write_reg = ex && writes_reg;
    c.write_mem = ex && (o == 4'h9 || o == 4'hB);
    c.alu_mux   = uses_addr;
    c.reg_a_mux = uses_d_as_a;
    c.wd_sel    = (o == 4'h8 || o == 4'hA) ? WD_LOAD : (o == 4'hF ? WD_PC : WD_RESULT);
    c.load_pc   = !ex || o == 4'hE || o == 4'hF || (o == 4'hC && z) || (o == 4'hD && p);
    return c;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl_t exp;
    op = OP_ADD; fetch = 1; execute = 0; eq0 = 0; gt0 = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    // halt in fetch phase does nothing
    @(negedge clk); op = OP_HALT; execute = 0; fetch = 1;
    @(posedge clk); #1;
    checks++;
    if (halted !== 1'b0) begin failures++; $display("FAIL halted in fetch"); end
    // opcodes 1..15, then 0 (halt) last, since its execute phase stops the
    // machine at the next edge; each (op, phase) is checked within half a cycle
    for (int k = 1; k <= 16; k++)
      for (int ph = 0; ph < 2; ph++) begin
        @(negedge clk);
        for (int c = 0; c < 4; c++) begin
          op = opcode_e'(k % 16); execute = ph[0]; fetch = !ph[0];
          eq0 = c[0]; gt0 = c[1];
          #1;
          exp = expected(4'(k % 16), ph[0], c[0], c[1]);
          checks++;
          if (ctrl !== exp || run !== 1'b1 || halted !== 1'b0) begin
            failures++;
            $display("FAIL op=%h ex=%b z=%b p=%b got=%h exp=%h", k % 16, ph[0], c[0], c[1], ctrl, exp);
          end
        end
      end
    // the halt left in its execute phase stops the machine at this edge
    @(posedge clk); #1;
    for (int o = 0; o < 16; o++) begin
      op = opcode_e'(o); execute = o[0]; fetch = !o[0];
      #1;
      checks++;
      if (halted !== 1'b1 || run !== 1'b0 || ctrl.write_ir || ctrl.write_mem ||
          ctrl.write_reg || ctrl.load_pc) begin
        failures++;
        $display("FAIL after halt op=%h halted=%b run=%b ctrl=%h", o, halted, run, ctrl);
      end
    end
    @(negedge clk); rst_n = 0;
    @(posedge clk); #1;
    checks++;
    if (halted !== 1'b0 || run !== 1'b1) begin failures++; $display("FAIL reset of halt"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
