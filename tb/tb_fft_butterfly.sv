// tb_fft_butterfly: checks the butterfly against two reference runs and a
// model, and checks the one-per-clock output stream.
//  - x=00110000, y=00000000: y0 = 11110100 + j00010010,
//    y1 = 00001100 + j11101110.
//  - x=00001111, y=00110011: stream values 01011101, 11010111, 10101001,
//    00101111 (y0_re, y1_im, y1_re, y0_im).
//  - random x, y against a model of the three stages with their wrap-around
//    widths (4-bit stage 1, 8-bit stages 2 and 3) and twiddle 6 + 4j.
//  - after reset, dout shows y0_re, y1_im, y1_re, y0_im on successive edges.
module tb_fft_butterfly;
  logic       clk = 0, rst_n = 0;
  logic [7:0] x, y, y0r, y0i, y1r, y1i, cur, dout;
  logic [1:0] phase;
  int checks = 0, failures = 0;

  fft_butterfly #(.W(4), .TW_C(6), .TW_D(4)) dut (
    .clk(clk), .rst_n(rst_n), .x(x), .y(y), .y0_re(y0r), .y0_im(y0i),
    .y1_re(y1r), .y1_im(y1i), .cur(cur), .phase(phase), .dout(dout));

  always #5 clk = ~clk;

  // Model: {y0_re, y0_im, y1_re, y1_im}
  function automatic logic [31:0] model(logic [7:0] xx, logic [7:0] yy);
    int a = xx[3:0], b = xx[7:4], e = yy[3:0], f = yy[7:4];
    int c = 6, d = 4;
    int apb = (a + b) % 16, dpc = (d + c) % 16, dmc = (d - c + 16) % 16;
    int im = (a * dmc + c * apb) % 256;          // bc + ad
    int re = (c * apb - b * dpc + 256 * 16) % 256; // ac - bd
    return {8'(e + re), 8'(f + im), 8'(e - re), 8'(f - im)};
  endfunction

  task automatic expect8(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] m;
    logic [7:0]  order [4];
    x = 8'b00110000; y = 8'b00000000;
    #1;
    expect8("ref1 y0_re", y0r, 8'b11110100);
    expect8("ref1 y0_im", y0i, 8'b00010010);
    expect8("ref1 y1_re", y1r, 8'b00001100);
    expect8("ref1 y1_im", y1i, 8'b11101110);
    expect8("ref1 s7",    dut.s7, 8'b00010010);
    expect8("ref1 s8",    dut.s8, 8'b11110100);

    // stream order after reset
    x = 8'b00001111; y = 8'b00110011;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    order = '{8'b01011101, 8'b11010111, 8'b10101001, 8'b00101111};
    for (int k = 0; k < 12; k++) begin
      @(posedge clk); #1;
      expect8($sformatf("ref2 stream %0d", k), dout, order[k % 4]);
    end

    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      x = 8'($urandom); y = 8'($urandom);
      #1;
      m = model(x, y);
      checks++;
      if ({y0r, y0i, y1r, y1i} != m) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h y=%h got %h model %h", x, y, {y0r, y0i, y1r, y1i}, m);
      end
      case (phase)
        2'd0: expect8("cur", cur, m[31:24]);
        2'd1: expect8("cur", cur, m[7:0]);
        2'd2: expect8("cur", cur, m[15:8]);
        default: expect8("cur", cur, m[23:16]);
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
