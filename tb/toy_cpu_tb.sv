// toy_cpu_tb: end-to-end test of the TOY processor at its default size.
//
// The testbench holds its own instruction-level model of the TOY machine
// (memory, registers, PC) and runs it in lockstep with the processor: the
// program is loaded through the loader port while the machine is in reset,
// and after every execute phase the PC, the IR and all 16 registers are
// compared with the model; memory is compared word by word when a program
// ends.  Every instruction must take exactly two clock cycles (fetch,
// execute).
//
// Programs: R1 <- R1 + R1 (the register is read during execute and written
// only at its very end), the two worked examples of the datapath (add 1234 at address
// 20 with R3 = 0028, R4 = 0064 giving R2 = 008C; jump and link FF30 at 20
// giving R[F] = 21 and pc = 30), a program summing an array with load
// indirect, branches and a subroutine call/return, and random programs.
// The testbench counts each mechanism (every opcode, branches taken and
// not taken, writes to R0, halt stopping the machine) and fails if one
// never happened.
module toy_cpu_tb;
  import toy_pkg::*;

  localparam int NUM_RANDOM = 300;    // random programs
  localparam int MAX_STEPS  = 400;    // instructions per random program

  logic  clk = 0, rst_n = 0;
  logic  ext_we = 0;
  addr_t ext_addr = 0;
  word_t ext_wdata = 0, ext_rdata;
  addr_t pc;
  word_t ir;
  logic  execute, halted;

  toy_cpu dut (.*);

  always #5 clk = ~clk;

  // ---- reference model ----
  word_t m_mem [256];
  word_t m_reg [16];
  addr_t m_pc;
  logic  m_halted;

  int checks = 0, failures = 0;
  int op_count [16];
  int bz_taken = 0, bz_not = 0, bp_taken = 0, bp_not = 0, r0_writes = 0;
  int halts_seen = 0, neg_shr = 0;
  longint cycles = 0;

  always @(posedge clk) cycles++;

  function automatic word_t rd(input logic [3:0] r);
    return (r == 0) ? 16'h0000 : m_reg[r];
  endfunction

  function automatic void wr(input logic [3:0] r, input word_t v);
    if (r != 0) m_reg[r] = v;
    else r0_writes++;
  endfunction

  function automatic bit is_pos(input word_t v);
    return !v[15] && v != 0;
  endfunction

  // Execute one instruction on the model; returns the instruction word.
  function automatic word_t model_step();
    word_t inst = m_mem[m_pc];
    logic [3:0] o = inst[15:12], d = inst[11:8], s = inst[7:4], t = inst[3:0];
    addr_t a = inst[7:0];
    word_t x, y, r;
    m_pc = m_pc + 8'd1;
    x = rd(s); y = rd(t);
    op_count[o]++;
    case (o)
      4'h0: m_halted = 1;
      4'h1: wr(d, x + y);
      4'h2: wr(d, x - y);
      4'h3: wr(d, x & y);
      4'h4: wr(d, x ^ y);
      4'h5: begin
        r = x;
        for (int i = 0; i < int'(y) && i < 17; i++) r = {r[14:0], 1'b0};
        wr(d, r);
      end
      4'h6: begin
        r = x;
        if (x[15] && y != 0) neg_shr++;
        for (int i = 0; i < int'(y) && i < 17; i++) r = {r[15], r[15:1]};
        wr(d, r);
      end
      4'h7: wr(d, word_t'(a));
      4'h8: wr(d, m_mem[a]);
      4'h9: m_mem[a] = rd(d);
      4'hA: wr(d, m_mem[y[7:0]]);
      4'hB: m_mem[y[7:0]] = rd(d);
      4'hC: if (rd(d) == 0) begin m_pc = a; bz_taken++; end else bz_not++;
      4'hD: if (is_pos(rd(d))) begin m_pc = a; bp_taken++; end else bp_not++;
      4'hE: m_pc = y[7:0];
      4'hF: begin wr(d, word_t'(m_pc)); m_pc = a; end
    endcase
    return inst;
  endfunction

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  // Load the model memory into the processor (reset held) and reset the model.
  task automatic load_and_reset();
    rst_n = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      ext_we = 1; ext_addr = addr_t'(i); ext_wdata = m_mem[i];
    end
    @(negedge clk); ext_we = 0;
    for (int i = 0; i < 16; i++) m_reg[i] = '0;
    m_pc = 8'h10; m_halted = 0;
    @(negedge clk); rst_n = 1;
  endtask

  task automatic compare_state(input string tag);
    chk({tag, " pc"}, 64'(pc), 64'(m_pc));
    for (int i = 0; i < 16; i++)
      chk($sformatf("%s R%0d", tag, i), 64'(((i == 0) ? 16'h0000 : dut.u_rf.regs[i])), 64'(m_reg[i]));
  endtask

  // Run up to max_steps instructions in lockstep; stops at a halt.
  task automatic run(input int max_steps, input string tag, input bit finish = 1);
    word_t inst;
    longint c0;
    for (int n = 0; n < max_steps && !m_halted; n++) begin
      // now at the start of a fetch phase (just after a falling edge)
      chk({tag, " fetch phase"}, 64'(execute), 64'(0));
      c0 = cycles;
      inst = model_step();
      @(posedge clk); #1;          // end of fetch: IR loaded, pc + 1
      chk({tag, " execute phase"}, 64'(execute), 64'(1));
      chk({tag, " ir"}, 64'(ir), 64'(inst));
      @(posedge clk); #1;          // end of execute
      chk({tag, " two cycles"}, 64'(cycles - c0), 64'(2));
      compare_state(tag);
      @(negedge clk);
    end
    if (!finish) return;
    if (m_halted) begin
      repeat (6) @(negedge clk);
      chk({tag, " halted"}, 64'(halted), 64'(1));
      compare_state({tag, " after halt"});
      halts_seen++;
    end else begin
      rst_n = 0;                   // stop the machine (fetch phase: no writes)
    end
    // memory contents
    for (int i = 0; i < 256; i++) begin
      ext_addr = addr_t'(i);
      #1 chk($sformatf("%s mem[%02h]", tag, i), 64'(ext_rdata), 64'(m_mem[i]));
    end
    @(negedge clk);
  endtask

  task automatic clear_mem();
    for (int i = 0; i < 256; i++) m_mem[i] = 16'h0000;
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) op_count[i] = 0;

    // ---- worked example: add ----
    clear_mem();
    m_mem[8'h10] = 16'h7328;   // R3 <- 0028
    m_mem[8'h11] = 16'h7464;   // R4 <- 0064
    m_mem[8'h12] = 16'hC020;   // R0 is zero: pc <- 20
    m_mem[8'h20] = 16'h1234;   // R2 <- R3 + R4
    m_mem[8'h21] = 16'h0000;   // halt
    load_and_reset();
    run(3, "add-setup", 0);
    chk("add: pc before fetch", 64'(pc), 64'(8'h20));
    @(posedge clk); #1;
    chk("add: pc after fetch", 64'(pc), 64'(8'h21));
    chk("add: IR after fetch", 64'(ir), 64'(16'h1234));
    chk("add: R3", 64'(dut.u_rf.regs[3]), 64'(16'h0028));
    chk("add: R4", 64'(dut.u_rf.regs[4]), 64'(16'h0064));
    @(posedge clk); #1;
    chk("add: pc after execute", 64'(pc), 64'(8'h21));
    chk("add: R2 after execute", 64'(dut.u_rf.regs[2]), 64'(16'h008C));
    void'(model_step());
    @(negedge clk);
    run(5, "add-rest");

    // ---- worked example: jump and link ----
    clear_mem();
    m_mem[8'h10] = 16'hC020;   // pc <- 20
    m_mem[8'h20] = 16'hFF30;   // R[F] <- pc; pc <- 30
    m_mem[8'h30] = 16'h0000;   // halt
    load_and_reset();
    run(1, "jal-setup", 0);
    chk("jal: pc before fetch", 64'(pc), 64'(8'h20));
    @(posedge clk); #1;
    chk("jal: pc after fetch", 64'(pc), 64'(8'h21));
    chk("jal: IR after fetch", 64'(ir), 64'(16'hFF30));
    @(posedge clk); #1;
    chk("jal: pc after execute", 64'(pc), 64'(8'h30));
    chk("jal: R[F] after execute", 64'(dut.u_rf.regs[15]), 64'(16'h0021));
    void'(model_step());
    @(negedge clk);
    run(5, "jal-rest");

    // ---- R1 <- R1 + R1: the write happens only at the end of execute ----
    clear_mem();
    m_mem[8'h10] = 16'h7105;   // lda R1, 05
    m_mem[8'h11] = 16'h1111;   // add R1, R1, R1
    m_mem[8'h12] = 16'h1111;   // add R1, R1, R1
    m_mem[8'h13] = 16'h0000;   // halt
    load_and_reset();
    run(10, "r1+r1");
    chk("R1 <- R1 + R1 twice", 64'(dut.u_rf.regs[1]), 64'(16'h0014));

    // ---- array sum with a subroutine ----
    // main: R1 <- 0x80 (array), R2 <- count 6, call sum at 0x40, store result, halt
    // sum:  R3 <- 0; loop: if R2 == 0 return; R4 <- mem[R1]; R3 += R4;
    //       R1 += 1; R2 -= 1; jump loop.  Returns with jr R[F].
    clear_mem();
    m_mem[8'h10] = 16'h7180;   // lda R1, 80
    m_mem[8'h11] = 16'h7206;   // lda R2, 6
    m_mem[8'h12] = 16'h7501;   // lda R5, 1
    m_mem[8'h13] = 16'hFF40;   // jal RF, 40
    m_mem[8'h14] = 16'h93A0;   // st R3, A0
    m_mem[8'h15] = 16'h96A0;   // st R6, A0 (R6 = 0, overwritten below)
    m_mem[8'h16] = 16'h93A1;   // st R3, A1
    m_mem[8'h17] = 16'h0000;   // halt
    m_mem[8'h40] = 16'h7300;   // lda R3, 0
    m_mem[8'h41] = 16'hC247;   // bz R2, 47
    m_mem[8'h42] = 16'hA401;   // ldi R4, R1
    m_mem[8'h43] = 16'h1334;   // add R3, R3, R4
    m_mem[8'h44] = 16'h1115;   // add R1, R1, R5
    m_mem[8'h45] = 16'h2225;   // sub R2, R2, R5
    m_mem[8'h46] = 16'hC041;   // bz R0, 41 (always)
    m_mem[8'h47] = 16'hE00F;   // jr RF
    for (int i = 0; i < 6; i++) m_mem[8'h80 + 8'(i)] = word_t'(i * 7 + 3);
    load_and_reset();
    run(200, "sum");
    chk("sum result", 64'(m_mem[8'hA1]), 64'(16'd123));

    // ---- random programs ----
    for (int p = 0; p < NUM_RANDOM; p++) begin
      for (int i = 0; i < 256; i++) begin
        word_t w;
        w = word_t'($urandom);
        // make halts rare and keep some small shift amounts and addresses
        if (w[15:12] == 4'h0 && ($urandom % 8) != 0) w[15:12] = 4'h1 + 4'($urandom % 15);
        if (w[15:12] == 4'hC && w[11:8] == 4'h0 && ($urandom % 4) != 0) w[11:8] = 4'h1 + 4'($urandom % 15);
        m_mem[i] = w;
      end
      // prologue: load R1..R15 from the data words at F1..FF
      for (int i = 1; i < 16; i++) m_mem[8'h10 + 8'(i) - 8'd1] = {4'h8, 4'(i), 8'hF0 + 8'(i)};
      load_and_reset();
      run(MAX_STEPS, $sformatf("rand%0d", p));
    end

    // ---- mechanism coverage ----
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (op_count[i] == 0) begin failures++; $display("FAIL opcode %h never executed", i); end
    end
    checks++; if (bz_taken == 0) begin failures++; $display("FAIL no taken branch zero"); end
    checks++; if (bz_not == 0) begin failures++; $display("FAIL no untaken branch zero"); end
    checks++; if (bp_taken == 0) begin failures++; $display("FAIL no taken branch positive"); end
    checks++; if (bp_not == 0) begin failures++; $display("FAIL no untaken branch positive"); end
    checks++; if (r0_writes == 0) begin failures++; $display("FAIL no write to R0"); end
    checks++; if (halts_seen == 0) begin failures++; $display("FAIL no halt"); end
    checks++; if (neg_shr == 0) begin failures++; $display("FAIL no right shift of a negative word"); end
    $display("coverage: ops=%p bz=%0d/%0d bp=%0d/%0d r0writes=%0d halts=%0d negshr=%0d cycles=%0d",
             op_count, bz_taken, bz_not, bp_taken, bp_not, r0_writes, halts_seen, neg_shr, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
