// tb_decoder: checks field extraction, the one-hot select lines and the
// operation classes for all sixteen opcodes with random operand fields,
// including the reference instruction 00110011_00001111_0111.
module tb_decoder;
  import risc_pkg::*;
  instr_t      ir;
  logic        ir_valid;
  opcode_e     op;
  data_t       x, y;
  logic [15:0] sel;
  logic        is_alu, is_two, is_dsp;
  int checks = 0, failures = 0;

  decoder dut (.ir(ir), .ir_valid(ir_valid), .op(op), .x(x), .y(y), .sel(sel),
               .is_alu(is_alu), .is_two_operand(is_two), .is_dsp(is_dsp));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ir = 20'b00110011_00001111_0111; ir_valid = 1; #1;
    checks++;
    if (x != 8'b00001111 || y != 8'b00110011 || op != OP_SUB || sel != 16'h0080) begin
      failures++; $display("FAIL reference instruction");
    end
    for (int i = 0; i < 400; i++) begin
      int o;
      logic [7:0] rx, ry;
      o  = i % 16;
      rx = 8'($urandom);
      ry = 8'($urandom);
      ir = {ry, rx, 4'(o)};
      ir_valid = (i % 7) != 3;
      #1;
      checks++;
      if (x != rx || y != ry || int'(op) != o ||
          sel    != (ir_valid ? 16'(1) << o : 16'h0) ||
          is_alu != (ir_valid && o <= 10) ||
          is_two != (ir_valid && o <= 7) ||
          is_dsp != (ir_valid && o >= 11 && o <= 13)) begin
        failures++;
        $display("FAIL op=%0d valid=%b sel=%h alu=%b two=%b dsp=%b", o, ir_valid, sel, is_alu, is_two, is_dsp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
