// tb_next_pc: checks pc+1 when pc_src is low and pc+1+offset (modulo 256)
// when it is high, over random and wrap-around values.
module tb_next_pc;
  int checks = 0, failures = 0;
  logic       pc_src;
  logic [7:0] curr_pc, offset, out;

  next_pc dut (.pc_src, .curr_pc, .offset, .out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic s, input int p, input int o);
    int e;
    pc_src = s; curr_pc = 8'(p); offset = 8'(o);
    #1;
    e = s ? (p + 1 + o) % 256 : (p + 1) % 256;
    checks++;
    if (out !== 8'(e)) begin
      failures++;
      $display("FAIL src=%b pc=%0d off=%0d out=%0d expected %0d", s, p, o, out, e);
    end
  endtask

  initial begin
    check(0, 255, 3); check(1, 255, 3); check(1, 10, 255); check(1, 0, 0);
    for (int n = 0; n < 300; n++) check(n[0], int'($urandom % 256), int'($urandom % 256));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
