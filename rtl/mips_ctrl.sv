// mips_ctrl: main decoder of the single-cycle processor.
//
// Decodes the opcode (and, for R-type, the funct field) of the fetched
// instruction into the datapath controls, combinationally:
//
//   instr   RegDst ALUSrc MemToReg RegWrite MemRead MemWrite branch ALU
//   R-type    1      0       0        1        0       0       0    add(32)/sub(34)/and(other)
//   lw        0      1       1        1        1       0       0    add
//   sw        0      1       0        0        0       1       0    add
//   beq       0      0       0        0        0       0       1    sub
//   addi      0      1       0        1        0       0       0    add
//   lwr       1      0       1        1        1       0       0    sub
//   other     0      0       0        0        0       0       0    and
//
// lwr (opcode 000001) loads rd from data memory at address rs - rt. An R-type
// funct other than add or sub selects ALU code 0 (and) while still writing
// rd; the all-zero nop therefore writes $0 & $0 back into $0.
module mips_ctrl
  import mips_pkg::*;
(
  input  word_t      instr,
  output logic       reg_dst,
  output logic       alu_src,
  output logic       mem_to_reg,
  output logic       reg_write,
  output logic       mem_write,
  output logic       mem_read,
  output logic       branch,
  output logic [3:0] alu_ctrl
);
  always_comb begin
    reg_dst    = 1'b0;
    alu_src    = 1'b0;
    mem_to_reg = 1'b0;
    reg_write  = 1'b0;
    mem_read   = 1'b0;
    mem_write  = 1'b0;
    branch     = 1'b0;
    alu_ctrl   = ALU_AND;
    case (f_opcode(instr))
      OP_RTYPE: begin
        reg_dst   = 1'b1;
        reg_write = 1'b1;
        case (f_funct(instr))
          FUNCT_ADD: alu_ctrl = ALU_ADD;
          FUNCT_SUB: alu_ctrl = ALU_SUB;
          default:   alu_ctrl = ALU_AND;
        endcase
      end
      OP_LW: begin
        alu_src    = 1'b1;
        mem_to_reg = 1'b1;
        reg_write  = 1'b1;
        mem_read   = 1'b1;
        alu_ctrl   = ALU_ADD;
      end
      OP_SW: begin
        alu_src   = 1'b1;
        mem_write = 1'b1;
        alu_ctrl  = ALU_ADD;
      end
      OP_BEQ: begin
        branch   = 1'b1;
        alu_ctrl = ALU_SUB;
      end
      OP_ADDI: begin
        alu_src   = 1'b1;
        reg_write = 1'b1;
        alu_ctrl  = ALU_ADD;
      end
      OP_LWR: begin
        reg_dst    = 1'b1;
        mem_to_reg = 1'b1;
        reg_write  = 1'b1;
        mem_read   = 1'b1;
        alu_ctrl   = ALU_SUB;
      end
      default: ;
    endcase
  end
endmodule
