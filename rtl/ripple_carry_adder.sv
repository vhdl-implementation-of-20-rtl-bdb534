// ripple_carry_adder: WIDTH-bit adder built as a chain of full adders.
//
// Cell i adds a[i], b[i] and the carry out of cell i-1 (cell 0 takes cin).
// The carry "ripples" from the least to the most significant cell, so the
// delay grows linearly with WIDTH. Purely combinational.
//
// Outputs: s is the WIDTH-bit sum, cout the carry out of the top cell and
// c the carry out of every cell (c[WIDTH-1] == cout). The 8-bit default and
// the chained full adder structure are the document's; exposing the carry
// vector follows its simulation, which shows it as signal c.
module ripple_carry_adder #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout,
  output logic [WIDTH-1:0] c
);
  logic [WIDTH:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_cell
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (carry[i]),
      .sum (s[i]),
      .cout(carry[i+1])
    );
  end

  assign c    = carry[WIDTH:1];
  assign cout = carry[WIDTH];
endmodule
