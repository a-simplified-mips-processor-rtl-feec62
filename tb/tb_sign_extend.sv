// tb_sign_extend: checks 16-to-32-bit sign extension on edge values and on
// random values against the signed integer value of the input.
module tb_sign_extend;
  int checks = 0, failures = 0;
  logic [15:0] in;
  logic [31:0] out;

  sign_extend dut (.in, .out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [15:0] v);
    int signed expect_val;
    in = v;
    #1;
    expect_val = (v >= 16'h8000) ? int'(v) - 65536 : int'(v);
    checks++;
    if ($signed(out) != expect_val) begin
      failures++;
      $display("FAIL in=%h out=%h expected %0d", v, out, expect_val);
    end
  endtask

  initial begin
    check(16'h0000); check(16'h0001); check(16'h7fff);
    check(16'h8000); check(16'hffff); check(16'hfffe);
    for (int n = 0; n < 200; n++) check(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
