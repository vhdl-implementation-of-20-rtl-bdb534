// fft_butterfly: radix-2 decimation-in-time FFT butterfly with a three-
// multiplier complex product.
//
// Operands: x = {b, a} and y = {f, e}, each field W bits, unsigned. The
// twiddle factor c + jd is fixed by the parameters TW_C and TW_D. The
// butterfly computes
//   (e + jf) + (a + jb)(c + jd)   ->  y0_re = e + (ac - bd), y0_im = f + (bc + ad)
//   (e + jf) - (a + jb)(c + jd)   ->  y1_re = e - (ac - bd), y1_im = f - (bc + ad)
// in three combinational stages that need only three multipliers:
//   stage 1  s1 = a + b,   s2 = d + c,   s3 = d - c          (W bits)
//   stage 2  s4 = a*s3,    s5 = c*s1,    s6 = b*s2           (2W bits)
//   stage 3  s7 = s4 + s5 = bc + ad,  s8 = s5 - s6 = ac - bd, then +/- with e, f
// All sums wrap modulo 2^W (stage 1) or 2^2W (stages 2 and 3), so the four
// results are 2W-bit two's complement words.
//
// The four results are also streamed on dout, one per clock, in the order
// y0_re, y1_im, y1_re, y0_im, repeating. cur is the value dout takes at the
// next rising edge and phase the index of that value. Reset clears dout and
// the phase.
//
// The stage structure, the 4-bit fields, the operand split and the stream
// order follow the document; the twiddle value 6 + 4j is recovered from the
// intermediate values of its simulation. Which of the two phases comes first
// after reset is this design's choice.
module fft_butterfly #(
  parameter int unsigned W    = 4,
  parameter int unsigned TW_C = 6,
  parameter int unsigned TW_D = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [2*W-1:0] x,
  input  logic [2*W-1:0] y,
  output logic [2*W-1:0] y0_re,
  output logic [2*W-1:0] y0_im,
  output logic [2*W-1:0] y1_re,
  output logic [2*W-1:0] y1_im,
  output logic [2*W-1:0] cur,
  output logic [1:0]     phase,
  output logic [2*W-1:0] dout
);
  localparam logic [W-1:0] C = W'(TW_C);
  localparam logic [W-1:0] D = W'(TW_D);

  logic [W-1:0]   a, b, e, f;
  logic [W-1:0]   s1, s2, s3;
  logic [2*W-1:0] s4, s5, s6, s7, s8;

  assign a = x[W-1:0];
  assign b = x[2*W-1:W];
  assign e = y[W-1:0];
  assign f = y[2*W-1:W];

  always_comb begin
    // stage 1
    s1 = a + b;
    s2 = D + C;
    s3 = D - C;
    // stage 2
    s4 = (2*W)'(a) * (2*W)'(s3);
    s5 = (2*W)'(C) * (2*W)'(s1);
    s6 = (2*W)'(b) * (2*W)'(s2);
    // stage 3
    s7 = s4 + s5;
    s8 = s5 - s6;
    y0_re = (2*W)'(e) + s8;
    y0_im = (2*W)'(f) + s7;
    y1_re = (2*W)'(e) - s8;
    y1_im = (2*W)'(f) - s7;
  end

  always_comb begin
    unique case (phase)
      2'd0: cur = y0_re;
      2'd1: cur = y1_im;
      2'd2: cur = y1_re;
      default: cur = y0_im;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      dout  <= '0;
    end else begin
      phase <= phase + 1'b1;
      dout  <= cur;
    end
  end
endmodule
