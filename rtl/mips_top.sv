// mips_top: single-cycle processor for a subset of the MIPS instruction set.
//
// Every instruction completes in one clock cycle. In one cycle the PC
// addresses instruction memory, the fetched word is decoded by mips_ctrl,
// the register file is read at rs and rt, the ALU works on rs and either rt
// or the sign-extended immediate, data memory is read or written at the ALU
// result, and on the next rising edge the result (ALU output or loaded
// word) is written to rt or rd and the PC moves to PC+1, or to
// PC+1+offset when a beq finds its operands equal (ALU zero flag and'ed with
// branch). Instructions: add, sub, lw, sw, beq, addi and lwr (load from
// address rs - rt into rd). Addresses count 32-bit words.
//
// Program loading: while rst_n is low, prog_we writes prog_data into
// instruction memory at prog_addr (the memory's address bus is switched from
// the PC to prog_addr). Without loading, the memory starts with the demo
// program of mips_pkg. Reset (active low, synchronous) sets PC to 0, clears
// the registers and refills data memory with its i*10+1 pattern.
//
// The trace outputs expose each cycle's architectural effects: the fetched
// instruction and its address, the register write (enable, index, value),
// the memory write (enable, address, value) and whether a branch was taken.
// All are valid in the cycle before the rising edge that commits them.
module mips_top
  import mips_pkg::*;
#(
  parameter int unsigned ADDR_W = MEM_AW
) (
  input  logic              clk,
  input  logic              rst_n,
  // program load port (used while in reset)
  input  logic              prog_we,
  input  logic [ADDR_W-1:0] prog_addr,
  input  word_t             prog_data,
  // execution trace
  output logic [ADDR_W-1:0] pc,
  output word_t             instr,
  output logic              rf_we,
  output logic [4:0]        rf_waddr,
  output word_t             rf_wdata,
  output logic              dm_we,
  output logic [ADDR_W-1:0] dm_addr,
  output word_t             dm_wdata,
  output logic              branch_taken
);
  // control signals
  logic       reg_dst, alu_src, mem_to_reg, reg_write, mem_write, mem_read, branch;
  logic [3:0] alu_ctrl;

  logic [ADDR_W-1:0] new_pc, im_abus;
  word_t             read_data1, read_data2, alu_b, alu_out, ext_imm, dm_rdata, wb_data;
  logic [4:0]        wr_reg;
  logic              zero, pc_src;
  logic              prog_load;  // program load active (only during reset)

  assign prog_load = prog_we && !rst_n;

  mips_pc #(.ADDR_W(ADDR_W)) u_pc (
    .clk, .rst_n, .new_pc, .pc
  );

  mux2 #(.WIDTH(ADDR_W)) u_im_addr_mux (
    .sel(prog_load), .in0(pc), .in1(prog_addr), .out(im_abus)
  );

  instr_mem #(.ADDR_W(ADDR_W)) u_imem (
    .clk, .csb(1'b0), .wrb(!prog_load), .abus(im_abus),
    .din(prog_data), .dout(instr)
  );

  mips_ctrl u_ctrl (
    .instr, .reg_dst, .alu_src, .mem_to_reg, .reg_write, .mem_write,
    .mem_read, .branch, .alu_ctrl
  );

  mux2 #(.WIDTH(5)) u_wr_reg_mux (
    .sel(reg_dst), .in0(f_rt(instr)), .in1(f_rd(instr)), .out(wr_reg)
  );

  mips_reg #(.DATA_W(DATA_W), .NUM_REGS(NUM_REGS)) u_regs (
    .clk, .rst_n, .reg_write(reg_write && rst_n),
    .read_addr1(f_rs(instr)), .read_addr2(f_rt(instr)),
    .write_addr(wr_reg), .write_data(wb_data),
    .read_data1, .read_data2
  );

  sign_extend u_sext (.in(f_imm(instr)), .out(ext_imm));

  mux2 #(.WIDTH(DATA_W)) u_alu_b_mux (
    .sel(alu_src), .in0(read_data2), .in1(ext_imm), .out(alu_b)
  );

  mips_alu u_alu (
    .alu_ctl(alu_ctrl), .a(read_data1), .b(alu_b), .alu_out, .zero
  );

  data_mem #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_dmem (
    .clk, .rst_n, .mem_read, .mem_write(mem_write && rst_n),
    .abus(alu_out[ADDR_W-1:0]), .din(read_data2), .dout(dm_rdata)
  );

  mux2 #(.WIDTH(DATA_W)) u_wb_mux (
    .sel(mem_to_reg), .in0(alu_out), .in1(dm_rdata), .out(wb_data)
  );

  assign pc_src = zero && branch;

  next_pc #(.ADDR_W(ADDR_W)) u_next_pc (
    .pc_src, .curr_pc(pc), .offset(instr[ADDR_W-1:0]), .out(new_pc)
  );

  // trace outputs
  assign rf_we        = reg_write && rst_n;
  assign rf_waddr     = wr_reg;
  assign rf_wdata     = wb_data;
  assign dm_we        = mem_write && rst_n;
  assign dm_addr      = alu_out[ADDR_W-1:0];
  assign dm_wdata     = read_data2;
  assign branch_taken = pc_src;
endmodule
