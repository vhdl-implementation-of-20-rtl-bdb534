// tb_alu: checks the eleven ALU operations.
// First the operands of the reference simulation (x=00001111, y=00110011)
// against the printed results of every operation, then random operands
// against a reference model written with plain integer arithmetic.
module tb_alu;
  import risc_pkg::*;
  opcode_e     op;
  logic [7:0]  x, y, res;
  logic        carry, ovf, valid;
  int checks = 0, failures = 0;

  alu #(.W(8)) dut (.op(op), .x(x), .y(y), .res(res), .carry(carry), .ovf(ovf), .valid(valid));

  function automatic logic [9:0] model(opcode_e o, logic [7:0] a, logic [7:0] b);
    // returns {valid, carry, result} (carry only meaningful for ADD/SUB)
    int s;
    case (o)
      OP_OR:   return {2'b10, a | b};
      OP_AND:  return {2'b10, a & b};
      OP_NAND: return {2'b10, ~(a & b)};
      OP_NOR:  return {2'b10, ~(a | b)};
      OP_XOR:  return {2'b10, a ^ b};
      OP_XNOR: return {2'b10, ~(a ^ b)};
      OP_ADD:  begin s = int'(a) + int'(b);       return {1'b1, s > 255, 8'(s)}; end
      OP_SUB:  begin s = int'(a) - int'(b);       return {1'b1, s >= 0, 8'(s)}; end
      OP_NOT:  return {2'b10, ~a};
      OP_INC:  return {2'b10, 8'(int'(a) + 1)};
      OP_DEC:  return {2'b10, 8'(int'(a) - 1)};
      default: return '0;
    endcase
  endfunction

  function automatic logic model_ovf(opcode_e o, logic [7:0] a, logic [7:0] b);
    int s;
    if (o == OP_ADD) s = int'($signed(a)) + int'($signed(b));
    else             s = int'($signed(a)) - int'($signed(b));
    return (s > 127) || (s < -128);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { opcode_e o; logic [7:0] r; } ref_t;
  ref_t refs [11] = '{
    '{OP_AND,  8'b00000011}, '{OP_OR,   8'b00111111}, '{OP_NAND, 8'b11111100},
    '{OP_NOR,  8'b11000000}, '{OP_XOR,  8'b00111100}, '{OP_XNOR, 8'b11000011},
    '{OP_ADD,  8'b01000010}, '{OP_SUB,  8'b11011100}, '{OP_NOT,  8'b11110000},
    '{OP_INC,  8'b00010000}, '{OP_DEC,  8'b00001110}
  };

  initial begin
    logic [9:0] m;
    x = 8'b00001111; y = 8'b00110011;
    foreach (refs[i]) begin
      op = refs[i].o;
      #1;
      checks++;
      if (res != refs[i].r || !valid) begin
        failures++;
        $display("FAIL reference %s: %b expected %b", op.name(), res, refs[i].r);
      end
    end
    for (int i = 0; i < 3000; i++) begin
      op = opcode_e'($urandom_range(0, 15));
      x = 8'($urandom); y = 8'($urandom);
      #1;
      m = model(op, x, y);
      checks++;
      if (valid != m[9] || (m[9] && res != m[7:0]) ||
          ((op == OP_ADD || op == OP_SUB) && (carry != m[8] || ovf != model_ovf(op, x, y)))) begin
        failures++;
        if (failures < 10)
          $display("FAIL %s x=%h y=%h -> res=%h c=%b v=%b valid=%b (model %h)", op.name(), x, y, res, carry, ovf, valid, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
