// mips_pc: program counter register.
//
// Loads new_pc on every rising clock edge, so the processor executes one
// instruction per cycle. The counter addresses 32-bit words of instruction
// memory and is ADDR_W bits wide (8 by default, 256 instructions). An
// active-low synchronous reset returns it to 0, the address of the first
// instruction; the reset input is this design's addition in place of
// start-up initialisation.
module mips_pc #(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] new_pc,
  output logic [ADDR_W-1:0] pc
);
  always_ff @(posedge clk) begin
    if (!rst_n) pc <= '0;
    else        pc <= new_pc;
  end
endmodule
