// dct4: four-point one-dimensional discrete cosine transform,
//   F(u) = sqrt(2/N) C(u) sum_{x=0..N-1} f(x) cos((2x+1) u pi / 2N),
//   N = 4, C(0) = 1/sqrt(2), C(u) = 1 otherwise.
//
// The sixteen coefficients sqrt(2/N) C(u) cos(...) are held as integers
// scaled by 2^8 and rounded: 0.5 -> 128, 0.6533 -> 167, 0.2706 -> 69.
// Each output is the sum of four products, rounded to OUT_FRAC fraction
// bits (round half up). Inputs are two's complement with IN_FRAC fraction
// bits; the output width OUT_W holds the largest possible result (twice
// the largest input). Purely combinational.
//
// The transform is the document's (the separable half of its 2-D DCT
// formula, and the "1-D DCT" block of its 4x4 2-D DCT); the coefficient
// precision and rounding are this design's choices.
module dct4 #(
  parameter int unsigned IN_W     = 8,
  parameter int unsigned IN_FRAC  = 0,
  parameter int unsigned OUT_FRAC = 0,
  parameter int unsigned OUT_W    = IN_W - IN_FRAC + 2 + OUT_FRAC
) (
  input  logic [3:0][IN_W-1:0]  f,
  output logic [3:0][OUT_W-1:0] F
);
  localparam int unsigned CF    = 8;                         // coefficient fraction bits
  localparam int unsigned SHIFT = CF + IN_FRAC - OUT_FRAC;
  localparam int unsigned ACC_W = IN_W + CF + 4;

  // K[u][x], scaled by 2^CF.
  localparam int K [4][4] = '{
    '{ 128,  128,  128,  128},
    '{ 167,   69,  -69, -167},
    '{ 128, -128, -128,  128},
    '{  69, -167,  167,  -69}
  };

  logic signed [ACC_W-1:0] acc [4];

  always_comb begin
    for (int u = 0; u < 4; u++) begin
      acc[u] = '0;
      for (int i = 0; i < 4; i++) begin
        acc[u] += ACC_W'(signed'(f[i])) * ACC_W'(K[u][i]);
      end
      acc[u] += ACC_W'(1) <<< (SHIFT - 1);
      F[u] = OUT_W'(acc[u] >>> SHIFT);
    end
  end
endmodule
