// tb_mips_reg: checks the register file against a reference array: reset
// clears every register, writes land on the rising edge only when
// reg_write is high, and both read ports return the addressed register
// combinationally.
module tb_mips_reg;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n, reg_write;
  logic [4:0]  ra1, ra2, wa;
  logic [31:0] wd, rd1, rd2;
  logic [31:0] model [32];

  mips_reg dut (.clk, .rst_n, .reg_write, .read_addr1(ra1), .read_addr2(ra2),
                .write_addr(wa), .write_data(wd), .read_data1(rd1), .read_data2(rd2));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_check();
    ra1 = 5'($urandom); ra2 = 5'($urandom);
    #1;
    checks += 2;
    if (rd1 !== model[ra1]) begin failures++; $display("FAIL r1[%0d]=%h expected %h", ra1, rd1, model[ra1]); end
    if (rd2 !== model[ra2]) begin failures++; $display("FAIL r2[%0d]=%h expected %h", ra2, rd2, model[ra2]); end
  endtask

  initial begin
    rst_n = 0; reg_write = 1; wa = 5'd3; wd = 32'hdead;
    @(posedge clk); #1;
    rst_n = 1; reg_write = 0;
    for (int i = 0; i < 32; i++) model[i] = 0;
    for (int i = 0; i < 32; i++) begin
      ra1 = 5'(i); ra2 = 5'(31 - i); #1;
      checks++;
      if (rd1 !== 0 || rd2 !== 0) begin failures++; $display("FAIL reg %0d not cleared", i); end
    end
    for (int n = 0; n < 500; n++) begin
      reg_write = ($urandom % 3) != 0;
      wa = 5'($urandom); wd = $urandom;
      read_check();
      @(posedge clk);
      if (reg_write) model[wa] = wd;
      #1;
      read_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
