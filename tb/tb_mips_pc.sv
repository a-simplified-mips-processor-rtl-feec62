// tb_mips_pc: checks that the program counter clears on reset and then
// takes the value of new_pc at every rising edge, one cycle later.
module tb_mips_pc;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n;
  logic [7:0] new_pc, pc, expected, prev;

  mips_pc dut (.clk, .rst_n, .new_pc, .pc);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; new_pc = 8'h5a;
    @(posedge clk); #1;
    checks++;
    if (pc !== 8'h00) begin failures++; $display("FAIL reset pc=%h", pc); end
    rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      prev = pc;
      new_pc = 8'($urandom);
      if (new_pc == prev) new_pc = ~prev;
      expected = new_pc;
      #2;
      checks += 2;  // the register must not follow new_pc before the edge
      if (pc !== prev) begin failures++; $display("FAIL pc changed before the edge"); end
      @(posedge clk); #1;
      if (pc !== expected) begin failures++; $display("FAIL pc=%h expected %h", pc, expected); end
    end
    rst_n = 0;
    @(posedge clk); #1;
    checks++;
    if (pc !== 8'h00) begin failures++; $display("FAIL second reset pc=%h", pc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
