// toy_memory_tb: self-checking test of the 256 x 16 main memory.
// Fills all 256 words through the loader port, reads them back on both
// ports, overwrites random words through the main port (write only while
// 'write' is set, at the clock edge), and checks every word against a
// reference array kept here.
module toy_memory_tb;
  import toy_pkg::*;

  logic  clk = 0;
  addr_t addr, ext_addr;
  logic  write, ext_we;
  word_t write_data, read_data, ext_wdata, ext_rdata;
  word_t ref_mem [256];
  int checks = 0, failures = 0;

  toy_memory dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input string what, input word_t got, input word_t exp);
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
    write = 0; ext_we = 0; addr = 0; ext_addr = 0; write_data = 0; ext_wdata = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      ext_we = 1; ext_addr = addr_t'(i); ext_wdata = word_t'($urandom);
      ref_mem[i] = ext_wdata;
    end
    @(negedge clk); ext_we = 0;
    for (int i = 0; i < 256; i++) begin
      addr = addr_t'(i); ext_addr = addr_t'(255 - i);
      #1;
      chk("read", read_data, ref_mem[i]);
      chk("ext read", ext_rdata, ref_mem[255 - i]);
    end
    // write port: only when write is set
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      addr = addr_t'($urandom); write_data = word_t'($urandom);
      write = ($urandom % 2) == 1;
      #1 chk("read before edge", read_data, ref_mem[addr]);
      @(posedge clk);
      if (write) ref_mem[addr] = write_data;
      #1 chk("read after edge", read_data, ref_mem[addr]);
    end
    @(negedge clk); write = 0;
    for (int i = 0; i < 256; i++) begin
      ext_addr = addr_t'(i);
      #1 chk("final", ext_rdata, ref_mem[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
