// tb_dct4: checks the four-point 1-D DCT against the formula
// F(u) = sqrt(2/N) C(u) sum f(x) cos((2x+1) u pi / 2N) evaluated in real
// arithmetic. With 8-bit coefficients the result must lie within 1 of the
// exact value; a constant input must give only a DC term of exactly 2f.
module tb_dct4;
  localparam int IN_W = 8;
  logic [3:0][IN_W-1:0]   f;
  logic [3:0][IN_W+1:0]   F;
  int checks = 0, failures = 0;

  dct4 #(.IN_W(IN_W)) dut (.f(f), .F(F));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real pi = 3.14159265358979;
    // constant inputs
    for (int v = -128; v < 128; v += 17) begin
      for (int i = 0; i < 4; i++) f[i] = 8'(v);
      #1;
      checks++;
      if (int'($signed(F[0])) != 2 * v || F[1] != 0 || F[2] != 0 || F[3] != 0) begin
        failures++;
        $display("FAIL constant %0d -> %0d %0d %0d %0d", v, $signed(F[0]), $signed(F[1]), $signed(F[2]), $signed(F[3]));
      end
    end
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < 4; i++) f[i] = 8'($urandom);
      #1;
      for (int u = 0; u < 4; u++) begin
        real s, cu;
        logic signed [IN_W+1:0] g;
        logic signed [IN_W-1:0] fx;
        s = 0.0;
        cu = (u == 0) ? 1.0 / $sqrt(2.0) : 1.0;
        g = F[u];
        for (int xx = 0; xx < 4; xx++)
        begin
          fx = f[xx];
          s += real'(fx) * $cos((2.0 * xx + 1.0) * u * pi / 8.0);
        end
        s = s * $sqrt(2.0 / 4.0) * cu;
        checks++;
        if (real'(g) - s > 1.0 || s - real'(g) > 1.0) begin
          failures++;
          if (failures < 10) $display("FAIL u=%0d got %0d ref %f", u, g, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
