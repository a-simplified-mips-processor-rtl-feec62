// tb_mips_top: end-to-end test of the single-cycle processor at its default
// size (256-word memories), against an instruction-level reference model
// kept in this testbench.
//
// Part 1 runs the built-in demo program straight out of reset and checks the
// values worked out by hand: the sw at word 11 stores 2 at data word 4, the
// lw at word 12 loads 2 into $5, the add at word 13 writes 6 into $3, and
// the beq at word 10 falls through.
// Part 2 loads random programs through the load port (with the processor in
// reset) and runs each for a few hundred cycles. Every cycle the trace
// outputs (PC, instruction, register write, memory write, branch) must match
// the model, which executes exactly one instruction per cycle, so the check
// also confirms one cycle per instruction. The test counts how often each
// mechanism occurred (taken and untaken beq, lw, lwr, sw, addi, add, sub,
// other R-type, undefined opcode, program load, load strobe raised while
// running, which must be ignored) and fails if one never did.
module tb_mips_top;
  import mips_pkg::*;

  localparam int CYCLES_PER_PROGRAM = 300;
  localparam int NUM_PROGRAMS       = 30;

  int checks = 0, failures = 0;

  logic        clk = 0, rst_n, prog_we;
  logic [7:0]  prog_addr;
  logic [31:0] prog_data;
  logic [7:0]  pc, dm_addr;
  logic [31:0] instr, rf_wdata, dm_wdata;
  logic        rf_we, dm_we, branch_taken;
  logic [4:0]  rf_waddr;

  mips_top dut (.clk, .rst_n, .prog_we, .prog_addr, .prog_data, .pc, .instr,
                .rf_we, .rf_waddr, .rf_wdata, .dm_we, .dm_addr, .dm_wdata,
                .branch_taken);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  logic [31:0] m_imem [256];
  logic [31:0] m_regs [32];
  logic [31:0] m_dmem [256];
  logic [7:0]  m_pc;

  typedef enum int {EV_BEQ_TAKEN, EV_BEQ_NOT, EV_LW, EV_LWR, EV_SW, EV_ADDI,
                    EV_ADD, EV_SUB, EV_ROTHER, EV_UNDEF, EV_LOAD, EV_STRAY, EV_NUM} ev_e;
  int events [EV_NUM];
  string ev_names [EV_NUM] = '{"beq taken", "beq not taken", "lw", "lwr", "sw",
                               "addi", "add", "sub", "other R-type", "undefined opcode",
                               "program load", "load strobe while running"};

  function automatic void model_reset();
    m_pc = 0;
    for (int i = 0; i < 32; i++)  m_regs[i] = 0;
    for (int i = 0; i < 256; i++) m_dmem[i] = 32'(i * 10 + 1);
  endfunction

  // Expected trace of the instruction at m_pc, then its architectural update.
  typedef struct {
    logic        rf_we;
    logic [4:0]  rf_waddr;
    logic [31:0] rf_wdata;
    logic        dm_we;
    logic [7:0]  dm_addr;
    logic [31:0] dm_wdata;
    logic        taken;
  } trace_t;

  function automatic trace_t model_step();
    trace_t t;
    logic [31:0] ins, rs, rt, imm;
    logic [5:0] op, fn;
    ins = m_imem[m_pc];
    op = ins[31:26]; fn = ins[5:0];
    rs = m_regs[ins[25:21]]; rt = m_regs[ins[20:16]];
    imm = {{16{ins[15]}}, ins[15:0]};
    t = '{default: '0};
    t.dm_wdata = rt;
    case (op)
      6'd0: begin
        t.rf_we = 1; t.rf_waddr = ins[15:11];
        if (fn == 6'd32)      begin t.rf_wdata = rs + rt; events[EV_ADD]++; end
        else if (fn == 6'd34) begin t.rf_wdata = rs - rt; events[EV_SUB]++; end
        else                  begin t.rf_wdata = rs & rt; events[EV_ROTHER]++; end
        t.dm_addr = t.rf_wdata[7:0];
      end
      6'b100011: begin  // lw
        t.dm_addr = 8'(rs + imm);
        t.rf_we = 1; t.rf_waddr = ins[20:16]; t.rf_wdata = m_dmem[t.dm_addr];
        events[EV_LW]++;
      end
      6'b000001: begin  // lwr
        t.dm_addr = 8'(rs - rt);
        t.rf_we = 1; t.rf_waddr = ins[15:11]; t.rf_wdata = m_dmem[t.dm_addr];
        events[EV_LWR]++;
      end
      6'b101011: begin  // sw
        t.dm_addr = 8'(rs + imm);
        t.dm_we = 1;
        t.rf_waddr = ins[20:16];
        events[EV_SW]++;
      end
      6'b000100: begin  // beq
        t.dm_addr = 8'(rs - rt);
        t.taken = (rs == rt);
        t.rf_waddr = ins[20:16];
        if (t.taken) events[EV_BEQ_TAKEN]++; else events[EV_BEQ_NOT]++;
      end
      6'b001000: begin  // addi
        t.rf_we = 1; t.rf_waddr = ins[20:16]; t.rf_wdata = rs + imm;
        t.dm_addr = t.rf_wdata[7:0];
        events[EV_ADDI]++;
      end
      default: begin
        t.dm_addr = 8'(rs & rt);
        t.rf_waddr = ins[20:16];
        events[EV_UNDEF]++;
      end
    endcase
    // commit
    if (t.rf_we) m_regs[t.rf_waddr] = t.rf_wdata;
    if (t.dm_we) m_dmem[t.dm_addr] = t.dm_wdata;
    m_pc = t.taken ? m_pc + 8'd1 + ins[7:0] : m_pc + 8'd1;
    return t;
  endfunction

  // Compare the DUT trace in the current cycle with the model, then advance.
  task automatic run_cycles(input int n);
    trace_t t;
    logic [7:0] pc_exp;
    logic [31:0] ins_exp;
    for (int c = 0; c < n; c++) begin
      // stray load strobes while running must change nothing
      prog_we = 1'($urandom); prog_addr = 8'($urandom); prog_data = $urandom;
      if (prog_we) events[EV_STRAY]++;
      #1;
      pc_exp = m_pc; ins_exp = m_imem[m_pc];
      t = model_step();
      checks++;
      if (pc !== pc_exp || instr !== ins_exp || rf_we !== t.rf_we || dm_we !== t.dm_we ||
          branch_taken !== t.taken ||
          (t.rf_we && (rf_waddr !== t.rf_waddr || rf_wdata !== t.rf_wdata)) ||
          (t.dm_we && (dm_addr !== t.dm_addr || dm_wdata !== t.dm_wdata))) begin
        failures++;
        if (failures < 10)
          $display("FAIL pc=%0d (exp %0d) instr=%h rf=%b/%0d/%h (exp %b/%0d/%h) dm=%b/%0d/%h (exp %b/%0d/%h) br=%b (exp %b)",
                   pc, pc_exp, instr, rf_we, rf_waddr, rf_wdata, t.rf_we, t.rf_waddr, t.rf_wdata,
                   dm_we, dm_addr, dm_wdata, t.dm_we, t.dm_addr, t.dm_wdata, branch_taken, t.taken);
      end
      @(posedge clk);
    end
  endtask

  // Random instruction over registers 0..7 (small values so that beq often
  // finds equal operands and addresses stay inside data memory).
  function automatic logic [31:0] rand_instr();
    logic [4:0] rs, rt, rd;
    rs = 5'($urandom % 8); rt = 5'($urandom % 8); rd = 5'($urandom % 8);
    case ($urandom % 12)
      0, 1:  return enc_r(rs, rt, rd, FUNCT_ADD);
      2:     return enc_r(rs, rt, rd, FUNCT_SUB);
      3:     return enc_r(rs, rt, rd, 6'($urandom));
      4, 5:  return enc_i(OP_ADDI, rs, rt, 16'($signed($urandom % 32) - 8));
      6:     return enc_i(OP_LW, rs, rt, 16'($urandom % 64));
      7:     return enc_i(OP_SW, rs, rt, 16'($urandom % 64));
      8:     return enc_r(rs, rt, rd, 6'd0) | {6'b000001, 26'd0};  // lwr
      9, 10: return enc_i(OP_BEQ, rs, rt, 16'($urandom % 6));
      default: return {6'b111111, 26'($urandom)};                  // undefined
    endcase
  endfunction

  task automatic load_program();
    rst_n = 0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 8'(a);
      prog_data = (a < 200) ? rand_instr() : 32'h0;
      m_imem[a] = prog_data;
    end
    @(negedge clk);
    prog_we = 0;
    events[EV_LOAD]++;
    @(posedge clk);  // one more reset edge
    #1 rst_n = 1;
    model_reset();
  endtask

  initial begin
    for (int i = 0; i < 256; i++) m_imem[i] = 32'h0;
    m_imem[0]  = 32'h20000000; m_imem[1]  = 32'h20210001; m_imem[2]  = 32'h20420002;
    m_imem[3]  = 32'h20630003; m_imem[4]  = 32'h20840004; m_imem[5]  = 32'h20a50005;
    m_imem[10] = 32'h10830002; m_imem[11] = 32'hac620001; m_imem[12] = 32'h8c850000;
    m_imem[13] = 32'h00851820;

    // Part 1: demo program from reset.
    rst_n = 0; prog_we = 0; prog_addr = 0; prog_data = 0;
    @(posedge clk); @(posedge clk);
    #1 rst_n = 1;
    model_reset();
    for (int c = 0; c < 14; c++) begin
      #1;
      if (c == 10) begin
        checks++;
        if (branch_taken !== 1'b0) begin failures++; $display("FAIL demo: beq taken"); end
      end
      if (c == 11) begin
        checks++;
        if (!(dm_we && dm_addr == 8'd4 && dm_wdata == 32'd2)) begin
          failures++; $display("FAIL demo: sw wrote %0d to %0d", dm_wdata, dm_addr);
        end
      end
      if (c == 12) begin
        checks++;
        if (!(rf_we && rf_waddr == 5'd5 && rf_wdata == 32'd2)) begin
          failures++; $display("FAIL demo: lw wrote %0d to $%0d", rf_wdata, rf_waddr);
        end
      end
      if (c == 13) begin
        checks++;
        if (!(rf_we && rf_waddr == 5'd3 && rf_wdata == 32'd6)) begin
          failures++; $display("FAIL demo: add wrote %0d to $%0d", rf_wdata, rf_waddr);
        end
      end
      run_cycles(1);
    end
    run_cycles(300);  // past the end, through the wrap of the PC and again

    // Part 2: random programs.
    for (int p = 0; p < NUM_PROGRAMS; p++) begin
      load_program();
      run_cycles(CYCLES_PER_PROGRAM);
    end

    for (int e = 0; e < EV_NUM; e++) begin
      $display("  %-18s %0d", ev_names[e], events[e]);
      checks++;
      if (events[e] == 0) begin failures++; $display("FAIL mechanism never exercised: %s", ev_names[e]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
