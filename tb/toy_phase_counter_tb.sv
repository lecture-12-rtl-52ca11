// toy_phase_counter_tb: checks that the phase counter starts in fetch after
// reset, alternates fetch and execute on every clock (two cycles per
// instruction), keeps fetch the inverse of execute, and holds while
// run = 0.
module toy_phase_counter_tb;
  logic clk = 0, rst_n = 0, run = 1;
  logic fetch, execute;
  int checks = 0, failures = 0;

  toy_phase_counter dut (.*);

  always #5 clk = ~clk;

  task automatic expect_phase(input logic exp_exec);
    checks++;
    if (execute !== exp_exec || fetch !== !exp_exec) begin
      failures++;
      $display("FAIL t=%0t execute=%b fetch=%b exp_execute=%b", $time, execute, fetch, exp_exec);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    repeat (2) @(posedge clk);
    #1 expect_phase(1'b0);
    rst_n = 1;
    exp = 1'b0;
    for (int i = 0; i < 20; i++) begin
      @(posedge clk); #1;
      exp = !exp;
      expect_phase(exp);
    end
    run = 0;
    for (int i = 0; i < 5; i++) begin
      @(posedge clk); #1;
      expect_phase(exp);
    end
    run = 1;
    @(posedge clk); #1;
    exp = !exp;
    expect_phase(exp);
    rst_n = 0;
    @(posedge clk); #1;
    expect_phase(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
