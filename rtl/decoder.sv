// decoder: instruction decoder.
//
// Splits the 20-bit instruction register into its fields (y = IR[19:12],
// x = IR[11:4], opcode = IR[3:0]), and from the opcode raises one of sixteen
// one-hot select lines, one per operation state. It also classifies the
// operation: is_alu for the eleven arithmetic/logic operations,
// is_two_operand for the eight that combine x and y (these update the status
// register), is_dsp for DCT, DFT and FFT. Nothing is selected while ir_valid
// is low. Purely combinational.
//
// The field positions and the opcode values are the document's. Using the x
// and y fields as operand values follows the document's simulation of the
// processor; the classification outputs are this design's.
module decoder
  import risc_pkg::*;
(
  input  instr_t      ir,
  input  logic        ir_valid,
  output opcode_e     op,
  output data_t       x,
  output data_t       y,
  output logic [15:0] sel,
  output logic        is_alu,
  output logic        is_two_operand,
  output logic        is_dsp
);
  instr_fields_t f;

  assign f  = instr_fields_t'(ir);
  assign op = f.op;
  assign x  = f.x;
  assign y  = f.y;

  always_comb begin
    sel            = '0;
    is_alu         = 1'b0;
    is_two_operand = 1'b0;
    is_dsp         = 1'b0;
    if (ir_valid) begin
      sel[f.op] = 1'b1;
      unique case (f.op)
        OP_OR, OP_AND, OP_NAND, OP_NOR, OP_XOR, OP_XNOR, OP_ADD, OP_SUB: begin
          is_alu         = 1'b1;
          is_two_operand = 1'b1;
        end
        OP_NOT, OP_INC, OP_DEC: is_alu = 1'b1;
        OP_DCT, OP_DFT, OP_FFT: is_dsp = 1'b1;
        default: ;
      endcase
    end
  end
endmodule
