// tb_mips_ctrl: checks the main decoder. Every opcode of the subset, with
// several funct values for R-type, plus random undefined opcodes, is
// compared with the control table
//   {RegDst, ALUSrc, MemToReg, RegWrite, MemRead, MemWrite, branch, ALU}
// written out independently in this testbench.
module tb_mips_ctrl;
  int checks = 0, failures = 0;
  logic [31:0] instr;
  logic reg_dst, alu_src, mem_to_reg, reg_write, mem_write, mem_read, branch;
  logic [3:0] alu_ctrl;

  mips_ctrl dut (.instr, .reg_dst, .alu_src, .mem_to_reg, .reg_write,
                 .mem_write, .mem_read, .branch, .alu_ctrl);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected = {RegDst, ALUSrc, MemToReg, RegWrite, MemRead, MemWrite, branch, ALU[3:0]}
  task automatic check(input logic [5:0] op, input logic [5:0] funct, input logic [10:0] expected);
    logic [10:0] got;
    instr = {op, 5'($urandom), 5'($urandom), 5'($urandom), 5'($urandom), funct};
    #1;
    got = {reg_dst, alu_src, mem_to_reg, reg_write, mem_read, mem_write, branch, alu_ctrl};
    checks++;
    if (got !== expected) begin
      failures++;
      $display("FAIL op=%b funct=%0d got %b expected %b", op, funct, got, expected);
    end
  endtask

  initial begin
    for (int n = 0; n < 20; n++) begin
      check(6'b000000, 6'd32, 11'b1001000_0010);  // add
      check(6'b000000, 6'd34, 11'b1001000_0110);  // sub
      check(6'b000000, 6'd0,  11'b1001000_0000);  // nop / other funct
      check(6'b000000, 6'd37, 11'b1001000_0000);
      check(6'b100011, 6'($urandom), 11'b0111100_0010);  // lw
      check(6'b101011, 6'($urandom), 11'b0100010_0010);  // sw
      check(6'b000100, 6'($urandom), 11'b0000001_0110);  // beq
      check(6'b001000, 6'($urandom), 11'b0101000_0010);  // addi
      check(6'b000001, 6'($urandom), 11'b1011100_0110);  // lwr
    end
    for (int n = 0; n < 200; n++) begin
      logic [5:0] op;
      op = 6'($urandom);
      if (op inside {6'b000000, 6'b100011, 6'b101011, 6'b000100, 6'b001000, 6'b000001}) continue;
      check(op, 6'($urandom), 11'b0000000_0000);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
