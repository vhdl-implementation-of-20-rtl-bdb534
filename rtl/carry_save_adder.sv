// carry_save_adder: adds four WIDTH-bit unsigned numbers a + b + e + f.
//
// A full adder has three inputs and two outputs, so a row of WIDTH full
// adders turns three numbers into two (a sum word and a carry word) with no
// carry travelling along the row. Two such rows reduce the four operands:
//   row 1: a[i] + b[i] + e[i]                 -> s1[i], k1[i]
//   row 2: s1[i] + f[i] + k1[i-1]             -> s2[i], k2[i]
// and a final rippling row adds the sum word to the shifted carry word:
//   row 3: s2[i] + k2[i-1] + ripple carry     -> s[i]
// One extra cell at the top adds the two top carries k1[W-1], k2[W-1] and the
// ripple carry, giving s[WIDTH] and s[WIDTH+1]. Purely combinational.
//
// The 4-bit default, the operand names a, b, e, f, the three rows of full
// adders plus the extra top cell and the WIDTH+2-bit result follow the
// document's array drawing; the exact routing of the carries between rows
// is this design's reading of it.
module carry_save_adder #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] e,
  input  logic [WIDTH-1:0] f,
  output logic [WIDTH+1:0] s
);
  logic [WIDTH-1:0] s1, k1;   // row 1 sum / carry words
  logic [WIDTH-1:0] s2, k2;   // row 2 sum / carry words
  logic [WIDTH:1]   rc;       // ripple carries of row 3

  for (genvar i = 0; i < WIDTH; i++) begin : g_col
    // row 1
    full_adder u_r1 (.a(a[i]), .b(b[i]), .cin(e[i]), .sum(s1[i]), .cout(k1[i]));
    // row 2
    if (i == 0) begin : g_r2_lsb
      full_adder u_r2 (.a(s1[i]), .b(f[i]), .cin(1'b0), .sum(s2[i]), .cout(k2[i]));
    end else begin : g_r2
      full_adder u_r2 (.a(s1[i]), .b(f[i]), .cin(k1[i-1]), .sum(s2[i]), .cout(k2[i]));
    end
    // row 3 (ripple)
    if (i == 0) begin : g_r3_lsb
      full_adder u_r3 (.a(s2[i]), .b(1'b0), .cin(1'b0), .sum(s[i]), .cout(rc[i+1]));
    end else begin : g_r3
      full_adder u_r3 (.a(s2[i]), .b(k2[i-1]), .cin(rc[i]), .sum(s[i]), .cout(rc[i+1]));
    end
  end

  // Extra top cell: both top carries and the ripple carry.
  full_adder u_top (
    .a   (k1[WIDTH-1]),
    .b   (k2[WIDTH-1]),
    .cin (rc[WIDTH]),
    .sum (s[WIDTH]),
    .cout(s[WIDTH+1])
  );
endmodule
