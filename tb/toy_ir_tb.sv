// toy_ir_tb: self-checking test of the instruction register.
// Loads words only when 'load' is set at the clock edge and checks the
// fields: 0x1234 gives op 1, d 2, s 3, t 4; 0xFF30 gives op F, d F,
// addr 0x30; plus random words.
module toy_ir_tb;
  import toy_pkg::*;

  logic      clk = 0, rst_n = 0, load = 0;
  word_t     din = 0, ir, exp_ir;
  opcode_e   op;
  reg_addr_t d, s, t;
  addr_t     addr;
  int checks = 0, failures = 0;

  toy_ir dut (.*);

  always #5 clk = ~clk;

  task automatic check_fields(input word_t w);
    checks++;
    if (ir !== w || 4'(op) !== w[15:12] || d !== w[11:8] || s !== w[7:4] ||
        t !== w[3:0] || addr !== w[7:0]) begin
      failures++;
      $display("FAIL ir=%h op=%h d=%h s=%h t=%h addr=%h exp=%h", ir, op, d, s, t, addr, w);
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
    #1 check_fields(16'h0000);
    @(negedge clk); rst_n = 1; load = 1; din = 16'h1234;
    @(posedge clk); #1 check_fields(16'h1234);
    checks++;
    if (op !== OP_ADD || d !== 4'h2 || s !== 4'h3 || t !== 4'h4) failures++;
    @(negedge clk); din = 16'hFF30;
    @(posedge clk); #1 check_fields(16'hFF30);
    checks++;
    if (op !== OP_JAL || d !== 4'hF || addr !== 8'h30) failures++;
    exp_ir = 16'hFF30;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      load = ($urandom % 2) == 1; din = word_t'($urandom);
      @(posedge clk);
      if (load) exp_ir = din;
      #1 check_fields(exp_ir);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
