// next_pc: computes the address of the next instruction.
//
// out = pc + 1 normally, or pc + 1 + offset when pc_src is high (a taken
// beq). Addresses count words, so the increment is 1 and the branch offset
// is the low ADDR_W bits of the instruction's immediate, added modulo
// 2^ADDR_W (an all-ones offset therefore steps backwards). Combinational.
module next_pc #(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              pc_src,
  input  logic [ADDR_W-1:0] curr_pc,
  input  logic [ADDR_W-1:0] offset,
  output logic [ADDR_W-1:0] out
);
  logic [ADDR_W-1:0] pc_plus1;
  always_comb begin
    pc_plus1 = curr_pc + 1'b1;
    out      = pc_src ? pc_plus1 + offset : pc_plus1;
  end
endmodule
