// data_mem: word-addressed data memory, 2^ADDR_W words of DATA_W bits.
//
// Reads are combinational: while mem_read is high, dout carries the word at
// abus in the same cycle, so a load completes in its single cycle; otherwise
// dout is 0. A write stores din at abus on the rising clock edge when
// mem_write is high. The processor drives abus with the low ADDR_W bits of
// the ALU result, i.e. addresses count words. The active-low synchronous
// reset fills word i with i*10+1, a recognisable pattern that makes every
// load's source visible in simulation.
module data_mem #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              mem_read,
  input  logic              mem_write,
  input  logic [ADDR_W-1:0] abus,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout
);
  localparam int unsigned DEPTH = 2 ** ADDR_W;

  logic [DATA_W-1:0] ram [DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) ram[i] <= DATA_W'(i * 10 + 1);
    end else if (mem_write) begin
      ram[abus] <= din;
    end
  end

  assign dout = mem_read ? ram[abus] : '0;
endmodule
