// risc_pkg: types and constants shared by the 20-bit RISC/DSP processor.
//
// An instruction is 20 bits: y field [19:12], x field [11:4], opcode [3:0].
// The x and y fields carry the 8-bit operand values; results are 8 bits wide.
// The opcode values are those of the processor's instruction table. Codes
// 1110 and 1111 are unassigned and execute as no-operations (this design's
// choice).
package risc_pkg;

  localparam int unsigned DATA_W  = 8;
  localparam int unsigned INSTR_W = 20;
  localparam int unsigned OP_W    = 4;

  typedef logic [DATA_W-1:0]  data_t;
  typedef logic [INSTR_W-1:0] instr_t;

  typedef enum logic [OP_W-1:0] {
    OP_OR    = 4'b0000,
    OP_AND   = 4'b0001,
    OP_NAND  = 4'b0010,
    OP_NOR   = 4'b0011,
    OP_XOR   = 4'b0100,
    OP_XNOR  = 4'b0101,
    OP_ADD   = 4'b0110,
    OP_SUB   = 4'b0111,
    OP_NOT   = 4'b1000,
    OP_INC   = 4'b1001,
    OP_DEC   = 4'b1010,
    OP_DCT   = 4'b1011,
    OP_DFT   = 4'b1100,
    OP_FFT   = 4'b1101,
    OP_RSV14 = 4'b1110,
    OP_RSV15 = 4'b1111
  } opcode_e;

  // Instruction fields, most significant first.
  typedef struct packed {
    data_t   y;    // [19:12]
    data_t   x;    // [11:4]
    opcode_e op;   // [3:0]
  } instr_fields_t;

  // Status register layout.
  typedef struct packed {
    logic n;   // result bit 7
    logic z;   // result is zero
    logic v;   // two's complement overflow (ADD/SUBTRACT)
    logic c;   // carry out of the adder (ADD/SUBTRACT)
  } status_t;

endpackage
