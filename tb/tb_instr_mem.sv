// tb_instr_mem: checks the instruction memory. The start-up contents must
// be the demo program, given here as literal machine words; all later words
// must be 0. Then random words are written through the write strobe and read
// back, and a deselected chip must output 0.
module tb_instr_mem;
  int checks = 0, failures = 0;
  logic clk = 0, csb, wrb;
  logic [7:0]  abus;
  logic [31:0] din, dout;
  logic [31:0] model [256];

  instr_mem dut (.clk, .csb, .wrb, .abus, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) model[i] = 32'h0;
    model[0]  = 32'h20000000;  // addi $0, $0, 0
    model[1]  = 32'h20210001;  // addi $1, $1, 1
    model[2]  = 32'h20420002;  // addi $2, $2, 2
    model[3]  = 32'h20630003;  // addi $3, $3, 3
    model[4]  = 32'h20840004;  // addi $4, $4, 4
    model[5]  = 32'h20a50005;  // addi $5, $5, 5
    model[10] = 32'h10830002;  // beq $4, $3, 2
    model[11] = 32'hac620001;  // sw $2, 1($3)
    model[12] = 32'h8c850000;  // lw $5, 0($4)
    model[13] = 32'h00851820;  // add $3, $4, $5

    csb = 0; wrb = 1; din = 0;
    for (int i = 0; i < 256; i++) begin
      abus = 8'(i); #1;
      checks++;
      if (dout !== model[i]) begin failures++; $display("FAIL init[%0d]=%h expected %h", i, dout, model[i]); end
    end

    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      abus = 8'($urandom);
      case ($urandom % 3)
        0: begin  // write
          csb = 0; wrb = 0; din = $urandom;
          @(posedge clk); model[abus] = din; #1;
          wrb = 1; #1;
          checks++;
          if (dout !== model[abus]) begin failures++; $display("FAIL readback[%0d]=%h expected %h", abus, dout, model[abus]); end
        end
        1: begin  // read
          csb = 0; wrb = 1; #1;
          checks++;
          if (dout !== model[abus]) begin failures++; $display("FAIL read[%0d]=%h expected %h", abus, dout, model[abus]); end
        end
        default: begin  // deselected: write strobe must be ignored
          csb = 1; wrb = 0; din = $urandom;
          @(posedge clk); #1;
          checks++;
          if (dout !== 32'h0) begin failures++; $display("FAIL deselected output %h", dout); end
          csb = 0; wrb = 1; #1;
          checks++;
          if (dout !== model[abus]) begin failures++; $display("FAIL write while deselected at %0d", abus); end
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
