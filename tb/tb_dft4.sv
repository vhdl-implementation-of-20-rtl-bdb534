// tb_dft4: exhaustive check (65536 sample sets) of the four-point DFT
// against the defining sum X_k = sum x_n exp(-i 2 pi k n / 4), evaluated in
// real arithmetic and rounded.
module tb_dft4;
  localparam int W = 4;
  logic [3:0][W-1:0] xs;
  logic [3:0][W+3:0] re, im;
  int checks = 0, failures = 0;

  dft4 #(.W(W)) dut (.xs(xs), .re(re), .im(im));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real pi = 3.14159265358979;
    for (int i = 0; i < (1 << (4*W)); i++) begin
      xs = (4*W)'(i);
      #1;
      for (int k = 0; k < 4; k++) begin
        real sr, si;
        logic signed [W+3:0] gr, gi;
        sr = 0.0;
        si = 0.0;
        for (int n = 0; n < 4; n++) begin
          sr += real'(xs[n]) * $cos(2.0 * pi * k * n / 4.0);
          si -= real'(xs[n]) * $sin(2.0 * pi * k * n / 4.0);
        end
        gr = re[k];
        gi = im[k];
        checks++;
        if (int'(gr) != $rtoi(sr + (sr >= 0 ? 0.5 : -0.5)) ||
            int'(gi) != $rtoi(si + (si >= 0 ? 0.5 : -0.5))) begin
          failures++;
          if (failures < 10) $display("FAIL x=%h k=%0d got %0d,%0d ref %f,%f", xs, k,
                                      gr, gi, sr, si);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
