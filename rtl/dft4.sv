// dft4: four-point discrete Fourier transform,
//   X_k = sum_{n=0..3} x_n * exp(-i*2*pi*k*n/4),  k = 0..3.
//
// For four points the twiddle factors are 1, -j, -1 and j, so the transform
// needs only additions and is exact:
//   X0 = (x0 + x1 + x2 + x3)
//   X1 = (x0 - x2) - j(x1 - x3)
//   X2 = (x0 - x1 + x2 - x3)
//   X3 = (x0 - x2) + j(x1 - x3)
// Samples are W-bit unsigned; results are (W+4)-bit two's complement, which
// holds every possible value. re[k] and im[k] are the parts of X_k. Purely
// combinational.
//
// The transform is the document's DFT definition; the size N = 4 and the
// sample width are this design's choices.
module dft4 #(
  parameter int unsigned W = 4
) (
  input  logic [3:0][W-1:0]   xs,
  output logic [3:0][W+3:0]   re,
  output logic [3:0][W+3:0]   im
);
  logic signed [W+3:0] v0, v1, v2, v3;

  always_comb begin
    v0 = signed'((W+4)'(xs[0]));
    v1 = signed'((W+4)'(xs[1]));
    v2 = signed'((W+4)'(xs[2]));
    v3 = signed'((W+4)'(xs[3]));
    re[0] = v0 + v1 + v2 + v3;
    im[0] = '0;
    re[1] = v0 - v2;
    im[1] = v3 - v1;
    re[2] = v0 - v1 + v2 - v3;
    im[2] = '0;
    re[3] = v0 - v2;
    im[3] = v1 - v3;
  end
endmodule
