// toy_pc_tb: self-checking test of the program counter.
// Checks the reset value 0x10, the pc + 1 path (mux input 0), the target
// path (mux input 1, the 0x11 / 0x5E example of the PC mux), holding when
// 'load' is low, and wrap-around from 0xFF to 0x00.
module toy_pc_tb;
  import toy_pkg::*;

  logic  clk = 0, rst_n = 0, load = 0, sel = 0;
  addr_t target = 0, pc;
  addr_t exp_pc;
  int checks = 0, failures = 0;

  toy_pc dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input string what, input addr_t got, input addr_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 chk("reset", pc, 8'h10);
    exp_pc = 8'h10;
    @(negedge clk); rst_n = 1;
    // example: pc + 1 = 0x11 versus target 0x5E
    @(negedge clk); load = 1; sel = 0; target = 8'h5E;
    @(posedge clk); #1 chk("pc+1", pc, 8'h11);
    @(negedge clk); sel = 1;
    @(posedge clk); #1 chk("target", pc, 8'h5E);
    exp_pc = 8'h5E;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      load = ($urandom % 3) != 0; sel = ($urandom % 2) == 1; target = addr_t'($urandom);
      @(posedge clk);
      if (load) exp_pc = sel ? target : exp_pc + 8'd1;
      #1 chk("pc", pc, exp_pc);
    end
    @(negedge clk); load = 1; sel = 1; target = 8'hFF;
    @(negedge clk); sel = 0;
    @(posedge clk); #1 chk("wrap", pc, 8'h00);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
