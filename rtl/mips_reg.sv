// mips_reg: the processor's register file, NUM_REGS registers of DATA_W bits.
//
// Two read ports (rs and rt fields) are combinational: read data follows the
// address in the same cycle. One write port stores write_data into
// write_addr on the rising clock edge when reg_write is high, so a value
// written by one instruction is visible to the next. Register 0 is an
// ordinary register here (it is not hard-wired to zero, as it is in full
// MIPS); software keeps it at 0. An active-low synchronous reset clears all
// registers to 0, this design's stand-in for start-up initialisation.
module mips_reg #(
  parameter int unsigned DATA_W   = 32,
  parameter int unsigned NUM_REGS = 32,
  parameter int unsigned AW       = $clog2(NUM_REGS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              reg_write,
  input  logic [AW-1:0]     read_addr1,
  input  logic [AW-1:0]     read_addr2,
  input  logic [AW-1:0]     write_addr,
  input  logic [DATA_W-1:0] write_data,
  output logic [DATA_W-1:0] read_data1,
  output logic [DATA_W-1:0] read_data2
);
  logic [DATA_W-1:0] regs [NUM_REGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_REGS; i++) regs[i] <= '0;
    end else if (reg_write) begin
      regs[write_addr] <= write_data;
    end
  end

  assign read_data1 = regs[read_addr1];
  assign read_data2 = regs[read_addr2];
endmodule
