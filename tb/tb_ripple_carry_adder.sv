// tb_ripple_carry_adder: checks the 8-bit ripple carry adder.
// First the operands of the reference simulation (a=01010101, b=11110000,
// cin=0 -> s=01000101, cout=1, carry vector 11110000), then random operands
// against a + b + cin, with the per-cell carries worked out bit by bit.
module tb_ripple_carry_adder;
  localparam int W = 8;
  logic [W-1:0] a, b, s, c;
  logic         cin, cout;
  int checks = 0, failures = 0;

  ripple_carry_adder #(.WIDTH(W)) dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout), .c(c));

  function automatic logic [W-1:0] carries(logic [W-1:0] aa, logic [W-1:0] bb, logic ci);
    logic [W-1:0] r;
    logic k = ci;
    for (int i = 0; i < W; i++) begin
      k    = (int'(aa[i]) + int'(bb[i]) + int'(k)) >= 2;
      r[i] = k;
    end
    return r;
  endfunction

  task automatic check(string what);
    int sum = int'(a) + int'(b) + int'(cin);
    checks++;
    if ({cout, s} != 9'(sum) || c != carries(a, b, cin)) begin
      failures++;
      $display("FAIL %s a=%b b=%b cin=%b -> cout=%b s=%b c=%b", what, a, b, cin, cout, s, c);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 8'b01010101; b = 8'b11110000; cin = 1'b0;
    #1;
    checks++;
    if (s != 8'b01000101 || cout != 1'b1 || c != 8'b11110000) begin
      failures++;
      $display("FAIL reference vector s=%b cout=%b c=%b", s, cout, c);
    end
    for (int i = 0; i < 2000; i++) begin
      a = 8'($urandom); b = 8'($urandom); cin = 1'($urandom);
      #1;
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
