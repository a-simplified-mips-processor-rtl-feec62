// tb_mux2: self-checking test of the 2:1 multiplexer at the two widths the
// processor uses (5 and 32 bits). Random inputs, both select values; the
// expected output is the selected input.
module tb_mux2;
  int checks = 0, failures = 0;
  logic sel;
  logic [4:0]  a5, b5, y5;
  logic [31:0] a32, b32, y32;

  mux2 #(.WIDTH(5))  dut5  (.sel, .in0(a5),  .in1(b5),  .out(y5));
  mux2 #(.WIDTH(32)) dut32 (.sel, .in0(a32), .in1(b32), .out(y32));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      sel = n[0];
      a5 = 5'($urandom); b5 = 5'($urandom);
      a32 = $urandom; b32 = $urandom;
      if (a5 == b5) b5 = ~a5;
      if (a32 == b32) b32 = ~a32;
      #1;
      checks += 2;
      if (y5 !== (n[0] ? b5 : a5)) begin
        failures++; $display("FAIL 5-bit sel=%0b y=%h", sel, y5);
      end
      if (y32 !== (n[0] ? b32 : a32)) begin
        failures++; $display("FAIL 32-bit sel=%0b y=%h", sel, y32);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
