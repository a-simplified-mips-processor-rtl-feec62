// tb_mips_alu: drives every 4-bit operation code with random and corner
// operands and compares the result and the zero flag with a reference
// computed in the testbench (and, or, add, sub, unsigned set-less-than, nor;
// 0 for unused codes).
module tb_mips_alu;
  int checks = 0, failures = 0;
  logic [3:0]  ctl;
  logic [31:0] a, b, y;
  logic        zero;

  mips_alu dut (.alu_ctl(ctl), .a, .b, .alu_out(y), .zero);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_alu(input logic [3:0] c, input logic [31:0] x, input logic [31:0] z);
    case (c)
      4'd0:  return x & z;
      4'd1:  return x | z;
      4'd2:  return x + z;
      4'd6:  return x - z;
      4'd7:  return (x < z) ? 32'd1 : 32'd0;
      4'd12: return ~(x | z);
      default: return 32'd0;
    endcase
  endfunction

  task automatic check(input logic [3:0] c, input logic [31:0] x, input logic [31:0] z);
    logic [31:0] e;
    ctl = c; a = x; b = z;
    #1;
    e = ref_alu(c, x, z);
    checks++;
    if (y !== e || zero !== (e == 0)) begin
      failures++;
      $display("FAIL ctl=%0d a=%h b=%h y=%h zero=%b expected %h", c, x, z, y, zero, e);
    end
  endtask

  initial begin
    for (int c = 0; c < 16; c++) begin
      check(4'(c), 32'd0, 32'd0);
      check(4'(c), 32'hffffffff, 32'd1);
      check(4'(c), 32'd5, 32'd5);
      check(4'(c), 32'd3, 32'd9);
      check(4'(c), 32'h80000000, 32'h7fffffff);
      for (int n = 0; n < 50; n++) check(4'(c), $urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
