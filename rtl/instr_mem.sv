// instr_mem: word-addressed instruction memory, 2^ADDR_W words of 32 bits.
//
// SRAM-style interface: csb is an active-low chip select, wrb an active-low
// write strobe, abus the word address. With csb low and wrb high the word at
// abus appears on dout combinationally (the processor fetches within the
// cycle). With csb and wrb both low, din is written to abus on the rising
// clock edge; this port lets a program be loaded while the processor is held
// in reset. When the chip is not selected dout is 0 (a nop), in place of a
// released tri-state bus. At start-up the memory holds
// mips_pkg::demo_program, all words past its end being 0.
module instr_mem
  import mips_pkg::*;
#(
  parameter int unsigned ADDR_W = MEM_AW
) (
  input  logic              clk,
  input  logic              csb,
  input  logic              wrb,
  input  logic [ADDR_W-1:0] abus,
  input  word_t             din,
  output word_t             dout
);
  localparam int unsigned DEPTH = 2 ** ADDR_W;

  word_t ram [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) ram[i] = demo_program(i);
  end

  always_ff @(posedge clk) begin
    if (!csb && !wrb) ram[abus] <= din;
  end

  assign dout = (!csb && wrb) ? ram[abus] : '0;
endmodule
