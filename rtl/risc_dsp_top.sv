// risc_dsp_top: 20-bit-instruction RISC processor with DSP operations, and
// beside it a 4-operand carry save adder and a 4x4 2-D DCT.
//
// Processor. Each 20-bit instruction holds two 8-bit operand values, y in
// bits 19..12 and x in bits 11..4, and an opcode in bits 3..0. The fetch
// machine reads the word at PC from the external instruction memory into
// IR and advances its 3-bit PC every clock; the decoder splits IR; the
// selected unit computes the result; and at the next clock edge the result
// is written to the 8-bit OUTPUT register. One instruction completes per
// clock; a result appears on `result` two rising edges after its address
// was on imem_addr.
//   - OR ... DECREMENT (codes 0000-1010): the ALU. The eight two-operand
//     operations (0000-0111) also load the status register {N,Z,V,C};
//     V and C are the adder's overflow and carry for ADD and SUBTRACT and
//     0 for the logic operations.
//   - FFT (1101): the butterfly (e+jf) +/- (a+jb)(6+4j) with
//     {b,a} = x and {f,e} = y. Its four results stream continuously, one
//     per clock, in the order y0_re, y1_im, y1_re, y0_im, on fft_stream
//     (for the operands of the instruction in execute); an FFT instruction
//     writes to OUTPUT the value fft_stream takes at the same edge.
//   - DFT (1100): four-point DFT of the samples x[3:0], x[7:4], y[3:0],
//     y[7:4]; eight results re0, im0, re1, im1, re2, im2, re3, im3, of which
//     the instruction writes number dsp_phase (a 3-bit counter that runs
//     freely from reset).
//   - DCT (1011): four-point 1-D DCT of the same four samples, rounded to
//     integers; the instruction writes result number dsp_phase[1:0].
//   - 1110 and 1111 are unassigned: OUTPUT and SR keep their values.
//
// Stand-alone datapaths (no instruction reaches them): csa_s = csa_a +
// csa_b + csa_e + csa_f through the carry save adder array, and dct_out =
// the 2-D DCT of the 4x4 block dct_in. Both are combinational.
//
// The instruction format, opcode table, 3-bit PC, 8-bit output, the adders,
// the butterfly and the transforms follow the document. Fetch/execute timing,
// the status flags, the handling of multi-result DSP operations and the
// treatment of the unassigned opcodes are this design's choices.
module risc_dsp_top
  import risc_pkg::*;
#(
  parameter int unsigned PC_W     = 3,
  parameter int unsigned DCT_IN_W = 8,
  parameter int unsigned CSA_W    = 4
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // external instruction memory
  output logic [PC_W-1:0]                  imem_addr,
  input  instr_t                           imem_data,
  // processor state
  output data_t                            result,
  output status_t                          status,
  output instr_t                           ir,
  output logic [2:0]                       dsp_phase,
  output data_t                            fft_stream,
  // stand-alone carry save adder
  input  logic [CSA_W-1:0]                 csa_a,
  input  logic [CSA_W-1:0]                 csa_b,
  input  logic [CSA_W-1:0]                 csa_e,
  input  logic [CSA_W-1:0]                 csa_f,
  output logic [CSA_W+1:0]                 csa_s,
  // stand-alone 2-D DCT
  input  logic [3:0][3:0][DCT_IN_W-1:0]    dct_in,
  output logic [3:0][3:0][DCT_IN_W+3:0]    dct_out
);
  // ---------------------------------------------------------------- fetch
  logic ir_valid;

  instruction_fetch #(.PC_W(PC_W)) u_fetch (
    .clk      (clk),
    .rst_n    (rst_n),
    .imem_addr(imem_addr),
    .imem_data(imem_data),
    .ir       (ir),
    .ir_valid (ir_valid)
  );

  // --------------------------------------------------------------- decode
  opcode_e     op;
  data_t       x, y;
  logic [15:0] sel;
  logic        is_alu, is_two_operand, is_dsp;

  decoder u_dec (
    .ir            (ir),
    .ir_valid      (ir_valid),
    .op            (op),
    .x             (x),
    .y             (y),
    .sel           (sel),
    .is_alu        (is_alu),
    .is_two_operand(is_two_operand),
    .is_dsp        (is_dsp)
  );

  // ------------------------------------------------------------------ ALU
  data_t alu_res;
  logic  alu_carry, alu_ovf, alu_valid;

  alu #(.W(DATA_W)) u_alu (
    .op   (op),
    .x    (x),
    .y    (y),
    .res  (alu_res),
    .carry(alu_carry),
    .ovf  (alu_ovf),
    .valid(alu_valid)
  );

  // ------------------------------------------------------------ DSP units
  data_t fft_cur;

  fft_butterfly #(.W(DATA_W/2)) u_fft (
    .clk  (clk),
    .rst_n(rst_n),
    .x    (x),
    .y    (y),
    .y0_re(),
    .y0_im(),
    .y1_re(),
    .y1_im(),
    .cur  (fft_cur),
    .phase(),
    .dout (fft_stream)
  );

  logic [3:0][3:0] samples;
  assign samples = {y[7:4], y[3:0], x[7:4], x[3:0]};

  logic [3:0][7:0] dft_re, dft_im;

  dft4 #(.W(4)) u_dft (
    .xs(samples),
    .re(dft_re),
    .im(dft_im)
  );

  logic [3:0][4:0] dct_samples;
  logic [3:0][6:0] dct_res;

  for (genvar i = 0; i < 4; i++) begin : g_dct_s
    assign dct_samples[i] = {1'b0, samples[i]};
  end

  dct4 #(.IN_W(5)) u_dct (
    .f(dct_samples),
    .F(dct_res)
  );

  // Free-running phase that picks which result of a DCT/DFT is written.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dsp_phase <= '0;
    else        dsp_phase <= dsp_phase + 1'b1;
  end

  // -------------------------------------------------------------- execute
  data_t   out_d;
  logic    we_out, we_sr;
  status_t sr_d;

  always_comb begin
    out_d  = alu_res;
    we_out = 1'b0;
    if (is_alu) begin
      out_d  = alu_res;
      we_out = alu_valid;
    end else if (is_dsp) begin
      we_out = 1'b1;
      unique case (op)
        OP_FFT:  out_d = fft_cur;
        OP_DFT:  out_d = dsp_phase[0] ? dft_im[dsp_phase[2:1]] : dft_re[dsp_phase[2:1]];
        default: out_d = data_t'(signed'(dct_res[dsp_phase[1:0]]));
      endcase
    end
  end

  always_comb begin
    sr_d.n = alu_res[DATA_W-1];
    sr_d.z = (alu_res == '0);
    sr_d.v = (op inside {OP_ADD, OP_SUB}) ? alu_ovf   : 1'b0;
    sr_d.c = (op inside {OP_ADD, OP_SUB}) ? alu_carry : 1'b0;
    we_sr  = is_two_operand;
  end

  register_set u_rs (
    .clk   (clk),
    .rst_n (rst_n),
    .we_out(we_out),
    .out_d (out_d),
    .we_sr (we_sr),
    .sr_d  (sr_d),
    .out_q (result),
    .sr_q  (status)
  );

  // ------------------------------------------------- stand-alone datapaths
  carry_save_adder #(.WIDTH(CSA_W)) u_csa (
    .a(csa_a),
    .b(csa_b),
    .e(csa_e),
    .f(csa_f),
    .s(csa_s)
  );

  dct2d #(.IN_W(DCT_IN_W)) u_dct2d (
    .blk_in (dct_in),
    .blk_out(dct_out)
  );

  // A DSP or ALU operation is selected by exactly one decoder line.
  always_comb begin
    if (ir_valid) assert ($onehot(sel));
  end
endmodule
