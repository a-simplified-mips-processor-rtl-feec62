// mips_pkg: shared widths, instruction encodings and ALU operation codes of
// the single-cycle MIPS subset processor.
//
// The processor is word addressed: the program counter and both memory
// address buses count 32-bit words, not bytes, and are 8 bits wide (256
// words per memory). The instruction subset is add, sub (R-type), lw, sw,
// beq, addi and lwr, a load whose address is the difference of two registers
// (rs - rt) and whose destination is rd. The encodings of the standard
// instructions are the MIPS ones; lwr uses opcode 6'b000001.
// The 4-bit ALU operation codes are the classic MIPS ALU control values.
// The default instruction-memory contents (demo_program) are a short test
// program: six addi, four nop, then beq, sw, lw, add.
package mips_pkg;

  localparam int unsigned DATA_W   = 32;  // register and memory word width
  localparam int unsigned MEM_AW   = 8;   // PC and memory address width (words)
  localparam int unsigned NUM_REGS = 32;

  typedef logic [DATA_W-1:0] word_t;

  typedef enum logic [5:0] {
    OP_RTYPE = 6'b000000,
    OP_LWR   = 6'b000001,
    OP_BEQ   = 6'b000100,
    OP_ADDI  = 6'b001000,
    OP_LW    = 6'b100011,
    OP_SW    = 6'b101011
  } opcode_e;

  localparam logic [5:0] FUNCT_ADD = 6'd32;
  localparam logic [5:0] FUNCT_SUB = 6'd34;

  typedef enum logic [3:0] {
    ALU_AND = 4'd0,
    ALU_OR  = 4'd1,
    ALU_ADD = 4'd2,
    ALU_SUB = 4'd6,
    ALU_SLT = 4'd7,
    ALU_NOR = 4'd12
  } alu_op_e;

  // Field helpers for a 32-bit instruction word.
  function automatic logic [5:0] f_opcode(input word_t i); return i[31:26]; endfunction
  function automatic logic [4:0] f_rs(input word_t i);     return i[25:21]; endfunction
  function automatic logic [4:0] f_rt(input word_t i);     return i[20:16]; endfunction
  function automatic logic [4:0] f_rd(input word_t i);     return i[15:11]; endfunction
  function automatic logic [5:0] f_funct(input word_t i);  return i[5:0];   endfunction
  function automatic logic [15:0] f_imm(input word_t i);   return i[15:0];  endfunction

  // Instruction builders (used for the demo program and by testbenches).
  function automatic word_t enc_i(input logic [5:0] op, input logic [4:0] rs,
                                  input logic [4:0] rt, input logic [15:0] imm);
    return {op, rs, rt, imm};
  endfunction
  function automatic word_t enc_r(input logic [4:0] rs, input logic [4:0] rt,
                                  input logic [4:0] rd, input logic [5:0] funct);
    return {6'b000000, rs, rt, rd, 5'd0, funct};
  endfunction


  // Word n of the demo program; zero (a nop) beyond its end.
  function automatic word_t demo_program(input int unsigned n);
    case (n)
      0:  return enc_i(OP_ADDI, 5'd0, 5'd0, 16'd0);   // addi $0, $0, 0
      1:  return enc_i(OP_ADDI, 5'd1, 5'd1, 16'd1);   // addi $1, $1, 1
      2:  return enc_i(OP_ADDI, 5'd2, 5'd2, 16'd2);   // addi $2, $2, 2
      3:  return enc_i(OP_ADDI, 5'd3, 5'd3, 16'd3);   // addi $3, $3, 3
      4:  return enc_i(OP_ADDI, 5'd4, 5'd4, 16'd4);   // addi $4, $4, 4
      5:  return enc_i(OP_ADDI, 5'd5, 5'd5, 16'd5);   // addi $5, $5, 5
      10: return enc_i(OP_BEQ,  5'd4, 5'd3, 16'd2);   // beq  $4, $3, 2
      11: return enc_i(OP_SW,   5'd3, 5'd2, 16'd1);   // sw   $2, 1($3)
      12: return enc_i(OP_LW,   5'd4, 5'd5, 16'd0);   // lw   $5, 0($4)
      13: return enc_r(5'd4, 5'd5, 5'd3, FUNCT_ADD);  // add  $3, $4, $5
      default: return '0;                             // nop
    endcase
  endfunction

endpackage
