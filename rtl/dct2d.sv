// dct2d: 4x4 two-dimensional discrete cosine transform,
//   F(u,v) = (2/N) C(u) C(v) sum_x sum_y f(x,y) cos((2x+1)u pi/2N) cos((2y+1)v pi/2N),
//   N = 4.
//
// The transform is separable, so it is computed with eight four-point 1-D
// DCTs: four on the rows (over y, for each x) and four on the resulting
// columns (over x, for each v). The row results keep two fraction bits so
// that only the final result is rounded to an integer.
//
// blk_in[x][y] is the 4x4 block f(x,y), IN_W-bit two's complement;
// blk_out[u][v] is F(u,v), (IN_W+4)-bit two's complement. Purely
// combinational.
//
// The 4x4 size, the formula and the use of four 1-D DCT blocks on the input
// are the document's; computing the second dimension with four more 1-D DCTs
// (instead of the document's butterfly network after the first four) and
// the fixed-point precision are this design's choices. Both give the same
// F(u,v).
module dct2d #(
  parameter int unsigned IN_W = 8
) (
  input  logic [3:0][3:0][IN_W-1:0] blk_in,
  output logic [3:0][3:0][IN_W+3:0] blk_out
);
  localparam int unsigned RF  = 2;               // fraction bits between passes
  localparam int unsigned R_W = IN_W + 2 + RF;   // row pass result width

  logic [3:0][3:0][R_W-1:0] row_out;   // [x][v]
  logic [3:0][3:0][R_W-1:0] col_in;    // [v][x]
  logic [3:0][3:0][R_W-1:0] col_out;   // [v][u]

  for (genvar x = 0; x < 4; x++) begin : g_row
    dct4 #(.IN_W(IN_W), .IN_FRAC(0), .OUT_FRAC(RF), .OUT_W(R_W)) u_row (
      .f(blk_in[x]),
      .F(row_out[x])
    );
  end

  for (genvar v = 0; v < 4; v++) begin : g_col
    for (genvar x = 0; x < 4; x++) begin : g_t
      assign col_in[v][x] = row_out[x][v];
    end
    dct4 #(.IN_W(R_W), .IN_FRAC(RF), .OUT_FRAC(0), .OUT_W(R_W)) u_col (
      .f(col_in[v]),
      .F(col_out[v])
    );
    for (genvar u = 0; u < 4; u++) begin : g_o
      assign blk_out[u][v] = (IN_W+4)'(col_out[v][u]);
    end
  end
endmodule
