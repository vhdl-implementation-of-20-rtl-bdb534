// alu: arithmetic logic machine of the processor.
//
// Performs the eleven arithmetic and logical operations of the instruction
// set on the 8-bit operands x and y (two's complement):
//   OR, AND, NAND, NOR, XOR, XNOR   bitwise on x and y
//   ADD x + y, SUBTRACT x - y       two-operand arithmetic
//   NOT ~x, INCREMENT x + 1, DECREMENT x - 1   one-operand (x) arithmetic
// All arithmetic goes through one ripple carry adder whose B input and carry
// in are chosen per operation: y/0 for ADD, ~y/1 for SUBTRACT, 0/1 for
// INCREMENT and all-ones/0 for DECREMENT. Purely combinational.
//
// carry is the adder's carry out (for SUBTRACT it is 1 when no borrow
// occurred) and ovf the two's complement overflow of ADD and SUBTRACT.
// valid is high when op is one of the eleven operations above. The list of
// operations, their codes and which operand a one-operand operation uses
// follow the document; the shared adder and the flag definitions are this
// design's choices.
module alu
  import risc_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  opcode_e      op,
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] res,
  output logic         carry,
  output logic         ovf,
  output logic         valid
);
  logic [W-1:0] add_b, add_s, add_c;
  logic         add_cin, add_cout;

  // Adder operand selection.
  always_comb begin
    add_b   = y;
    add_cin = 1'b0;
    unique case (op)
      OP_SUB:  begin add_b = ~y;        add_cin = 1'b1; end
      OP_INC:  begin add_b = '0;        add_cin = 1'b1; end
      OP_DEC:  begin add_b = '1;        add_cin = 1'b0; end
      default: begin add_b = y;         add_cin = 1'b0; end
    endcase
  end

  ripple_carry_adder #(.WIDTH(W)) u_rca (
    .a   (x),
    .b   (add_b),
    .cin (add_cin),
    .s   (add_s),
    .cout(add_cout),
    .c   (add_c)
  );

  always_comb begin
    res   = '0;
    valid = 1'b1;
    unique case (op)
      OP_OR:   res = x | y;
      OP_AND:  res = x & y;
      OP_NAND: res = ~(x & y);
      OP_NOR:  res = ~(x | y);
      OP_XOR:  res = x ^ y;
      OP_XNOR: res = ~(x ^ y);
      OP_ADD, OP_SUB, OP_INC, OP_DEC: res = add_s;
      OP_NOT:  res = ~x;
      default: begin res = '0; valid = 1'b0; end
    endcase
  end

  // Overflow: the carry into the sign bit differs from the carry out of it.
  assign carry = add_cout;
  assign ovf   = add_c[W-1] ^ add_c[W-2];
endmodule
