// mux2: two-to-one multiplexer of parameterised width.
//
// out = sel ? in1 : in0, purely combinational. The processor uses it three
// times: at 5 bits to pick the destination register (rt or rd, RegDst), and
// at 32 bits to pick the second ALU operand (register or sign-extended
// immediate, ALUSrc) and the register write-back value (ALU result or memory
// data, MemToReg). A single width parameter replaces separate 5-bit and
// 32-bit copies of the same circuit.
module mux2 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             sel,
  input  logic [WIDTH-1:0] in0,
  input  logic [WIDTH-1:0] in1,
  output logic [WIDTH-1:0] out
);
  always_comb out = sel ? in1 : in0;
endmodule
