// tb_dct2d: checks the 4x4 2-D DCT against the double-sum formula
// F(u,v) = (2/N) C(u) C(v) sum_x sum_y f(x,y) cos((2x+1)u pi/2N) cos((2y+1)v pi/2N)
// in real arithmetic, for random blocks, a flat block and a single impulse.
// Results must lie within 1.5 of the exact value.
module tb_dct2d;
  localparam int IN_W = 8;
  logic [3:0][3:0][IN_W-1:0] bi;
  logic [3:0][3:0][IN_W+3:0] bo;
  int checks = 0, failures = 0;

  dct2d #(.IN_W(IN_W)) dut (.blk_in(bi), .blk_out(bo));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    real pi = 3.14159265358979;
    for (int u = 0; u < 4; u++)
      for (int v = 0; v < 4; v++) begin
        real s = 0.0;
        real cu = (u == 0) ? 1.0 / $sqrt(2.0) : 1.0;
        real cv = (v == 0) ? 1.0 / $sqrt(2.0) : 1.0;
        real d;
        for (int x = 0; x < 4; x++)
          for (int y = 0; y < 4; y++)
            s += real'($signed(bi[x][y])) * $cos((2.0 * x + 1.0) * u * pi / 8.0)
                                          * $cos((2.0 * y + 1.0) * v * pi / 8.0);
        s = s * (2.0 / 4.0) * cu * cv;
        d = real'($signed(bo[u][v])) - s;
        checks++;
        if (d > 1.5 || d < -1.5) begin
          failures++;
          if (failures < 10) $display("FAIL %s (%0d,%0d) got %0d ref %f", what, u, v, $signed(bo[u][v]), s);
        end
      end
  endtask

  initial begin
    for (int x = 0; x < 4; x++) for (int y = 0; y < 4; y++) bi[x][y] = 8'd100;
    #1; compare("flat");
    bi = '0; bi[1][2] = 8'h80;
    #1; compare("impulse");
    for (int t = 0; t < 500; t++) begin
      for (int x = 0; x < 4; x++) for (int y = 0; y < 4; y++) bi[x][y] = 8'($urandom);
      #1; compare("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
