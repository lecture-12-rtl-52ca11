// toy_regfile_tb: self-checking test of the 16 x 16 register file.
// Checks reset to zero, writes at the clock edge only when 'write' is set,
// two independent read ports, register 0 reading as zero, and the same
// register read and written in one cycle (old value until the edge).
module toy_regfile_tb;
  import toy_pkg::*;

  logic      clk = 0, rst_n = 0, write = 0;
  reg_addr_t a_addr = 0, b_addr = 0, w_addr = 0;
  word_t     w_data = 0, a_data, b_data;
  word_t     ref_r [16];
  int checks = 0, failures = 0;

  toy_regfile dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input string what, input word_t got, input word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  task automatic check_all();
    for (int i = 0; i < 16; i++) begin
      a_addr = reg_addr_t'(i); b_addr = reg_addr_t'(15 - i);
      #1;
      chk("A", a_data, ref_r[i]);
      chk("B", b_data, ref_r[15 - i]);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) ref_r[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    check_all();
    for (int i = 0; i < 800; i++) begin
      @(negedge clk);
      w_addr = reg_addr_t'($urandom); w_data = word_t'($urandom);
      write = ($urandom % 4) != 0;
      a_addr = w_addr; b_addr = reg_addr_t'($urandom);
      #1 chk("A before edge", a_data, ref_r[a_addr]);
      chk("B before edge", b_data, ref_r[b_addr]);
      @(posedge clk);
      if (write && w_addr != 0) ref_r[w_addr] = w_data;
      #1 chk("A after edge", a_data, ref_r[a_addr]);
    end
    @(negedge clk); write = 0;
    check_all();
    // R1 <- R1 + R1 style: write value then reset clears everything
    @(negedge clk); rst_n = 0;
    @(posedge clk); #1;
    for (int i = 0; i < 16; i++) ref_r[i] = '0;
    rst_n = 1;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
