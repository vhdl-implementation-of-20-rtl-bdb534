// tb_carry_save_adder: exhaustive check of the 4-bit, four-operand carry
// save adder against the integer sum a + b + e + f (65536 cases), and an
// 8-bit instance on the reference operands 01010101 + 11110000 (sum
// 1_01000101) plus random 8-bit operands.
module tb_carry_save_adder;
  localparam int W = 4;
  logic [W-1:0] a, b, e, f;
  logic [W+1:0] s;
  int checks = 0, failures = 0;

  carry_save_adder #(.WIDTH(W)) dut (.a(a), .b(b), .e(e), .f(f), .s(s));

  logic [7:0] a8, b8, e8, f8;
  logic [9:0] s8;
  carry_save_adder #(.WIDTH(8)) dut8 (.a(a8), .b(b8), .e(e8), .f(f8), .s(s8));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << (4*W)); i++) begin
      {a, b, e, f} = (4*W)'(i);
      #1;
      checks++;
      if (int'(s) != int'(a) + int'(b) + int'(e) + int'(f)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d+%0d+%0d+%0d -> %0d", a, b, e, f, s);
      end
    end
    a8 = 8'b01010101; b8 = 8'b11110000; e8 = '0; f8 = '0;
    #1;
    checks++;
    if (s8 != 10'b01_0100_0101) begin failures++; $display("FAIL 8-bit reference -> %b", s8); end
    for (int i = 0; i < 2000; i++) begin
      a8 = 8'($urandom); b8 = 8'($urandom); e8 = 8'($urandom); f8 = 8'($urandom);
      #1;
      checks++;
      if (int'(s8) != int'(a8) + int'(b8) + int'(e8) + int'(f8)) begin
        failures++;
        if (failures < 10) $display("FAIL 8-bit %0d+%0d+%0d+%0d -> %0d", a8, b8, e8, f8, s8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
