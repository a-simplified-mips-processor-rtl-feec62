// tb_data_mem: checks the data memory: after reset word i holds i*10+1;
// writes take effect at the rising edge only with mem_write high; reads
// are combinational and give 0 while mem_read is low.
module tb_data_mem;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n, mem_read, mem_write;
  logic [7:0]  abus;
  logic [31:0] din, dout;
  logic [31:0] model [256];

  data_mem dut (.clk, .rst_n, .mem_read, .mem_write, .abus, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; mem_read = 1; mem_write = 0; abus = 0; din = 0;
    @(posedge clk); #1;
    rst_n = 1;
    for (int i = 0; i < 256; i++) model[i] = 32'(i * 10 + 1);
    for (int i = 0; i < 256; i++) begin
      abus = 8'(i); #1;
      checks++;
      if (dout !== model[i]) begin failures++; $display("FAIL reset[%0d]=%0d expected %0d", i, dout, model[i]); end
    end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      abus = 8'($urandom); din = $urandom;
      mem_write = ($urandom % 2) == 1;
      mem_read = 1; #1;
      checks++;
      if (dout !== model[abus]) begin failures++; $display("FAIL read[%0d]=%h expected %h", abus, dout, model[abus]); end
      mem_read = 0; #1;
      checks++;
      if (dout !== 32'h0) begin failures++; $display("FAIL output %h with mem_read low", dout); end
      @(posedge clk);
      if (mem_write) model[abus] = din;
      #1; mem_write = 0; mem_read = 1; #1;
      checks++;
      if (dout !== model[abus]) begin failures++; $display("FAIL after write [%0d]=%h expected %h", abus, dout, model[abus]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
