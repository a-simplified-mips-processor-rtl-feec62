// mips_alu: 32-bit arithmetic/logic unit of the single-cycle processor.
//
// A 4-bit operation code (mips_pkg::alu_op_e) selects the result:
//   0 and, 1 or, 2 add, 6 subtract, 7 set-less-than, 12 nor;
// any other code gives 0. Add and subtract wrap modulo 2^32 with no overflow
// signal. Set-less-than compares A and B as unsigned numbers and returns 1 or
// 0. Zero is high whenever the result is 0; the branch logic uses it after a
// subtract to detect rs == rt. Purely combinational.
module mips_alu
  import mips_pkg::*;
(
  input  logic [3:0] alu_ctl,
  input  word_t      a,
  input  word_t      b,
  output word_t      alu_out,
  output logic       zero
);
  always_comb begin
    unique case (alu_ctl)
      ALU_AND: alu_out = a & b;
      ALU_OR:  alu_out = a | b;
      ALU_ADD: alu_out = a + b;
      ALU_SUB: alu_out = a - b;
      ALU_SLT: alu_out = (a < b) ? word_t'(1) : word_t'(0);
      ALU_NOR: alu_out = ~(a | b);
      default: alu_out = '0;
    endcase
  end

  assign zero = (alu_out == '0);
endmodule
