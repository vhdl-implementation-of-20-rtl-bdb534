// tb_risc_dsp_top: end-to-end test of the processor and the stand-alone
// datapaths, at the default parameters.
//
// The test plays the external instruction memory: every cycle it checks that
// the address equals the cycle count modulo 8 and returns the next word of
// an instruction stream. The stream starts with the reference instructions
// (SUBTRACT with x=00001111, y=00110011 giving 11011100; FFT with
// x=00110000, y=00000000), then random instructions of all sixteen codes.
// A reference model written here from the operation definitions predicts
// OUTPUT and SR two edges after each word is fetched, using the DSP phase
// (the number of rising edges since reset before the executing edge). Meanwhile random operands drive the carry
// save adder (checked exactly) and random blocks the 2-D DCT (checked
// against the real-valued formula, within 1.5). A reset in mid-run checks
// that the processor restarts at address 0.
//
// Every mechanism is counted: each opcode, status register update and hold,
// hold on an unassigned code, PC wrap, every FFT/DFT/DCT result phase, the
// ADD carry and overflow flags, the CSA, the 2-D DCT and the mid-run reset.
// A mechanism that never happened is a failure.
module tb_risc_dsp_top;
  import risc_pkg::*;

  logic                      clk = 0, rst_n = 0;
  logic [2:0]                imem_addr;
  instr_t                    imem_data, ir;
  data_t                     result, fft_stream;
  status_t                   status;
  logic [2:0]                dsp_phase;
  logic [3:0]                csa_a, csa_b, csa_e, csa_f;
  logic [5:0]                csa_s;
  logic [3:0][3:0][7:0]      dct_in;
  logic [3:0][3:0][11:0]     dct_out;

  risc_dsp_top dut (
    .clk(clk), .rst_n(rst_n), .imem_addr(imem_addr), .imem_data(imem_data),
    .result(result), .status(status), .ir(ir), .dsp_phase(dsp_phase),
    .fft_stream(fft_stream),
    .csa_a(csa_a), .csa_b(csa_b), .csa_e(csa_e), .csa_f(csa_f), .csa_s(csa_s),
    .dct_in(dct_in), .dct_out(dct_out));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_op [16];
  int n_sr_upd = 0, n_sr_hold = 0, n_rsv_hold = 0, n_pc_wrap = 0, n_carry = 0, n_ovf = 0;
  int n_fft_ph [4], n_dft_ph [8], n_dct_ph [4];
  int n_csa = 0, n_dct2d = 0, n_reset = 0;

  localparam real PI = 3.14159265358979;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  // ----------------------------------------------------------- reference model
  typedef struct {
    logic    we_out;
    data_t   out;
    logic    we_sr;
    status_t sr;
    logic    tol;     // result may be off by one (DCT rounding)
  } eff_t;

  function automatic eff_t model(instr_t w, int ph);
    eff_t  r;
    int    xv = w[11:4], yv = w[19:12];
    int    s [4];
    int    res;
    r.we_out = 1'b1; r.we_sr = 1'b0; r.sr = '0; r.tol = 1'b0; res = 0;
    s[0] = xv % 16; s[1] = xv / 16; s[2] = yv % 16; s[3] = yv / 16;
    case (opcode_e'(w[3:0]))
      OP_OR:   res = xv | yv;
      OP_AND:  res = xv & yv;
      OP_NAND: res = ~(xv & yv);
      OP_NOR:  res = ~(xv | yv);
      OP_XOR:  res = xv ^ yv;
      OP_XNOR: res = ~(xv ^ yv);
      OP_ADD:  res = xv + yv;
      OP_SUB:  res = xv - yv;
      OP_NOT:  res = ~xv;
      OP_INC:  res = xv + 1;
      OP_DEC:  res = xv - 1;
      OP_FFT: begin
        int apb = (s[0] + s[1]) % 16, dpc = 10, dmc = 14;   // c = 6, d = 4
        int im = (s[0] * dmc + 6 * apb) % 256;
        int re = (6 * apb - s[1] * dpc + 4096) % 256;
        case (ph % 4)
          0: res = s[2] + re;
          1: res = s[3] - im;
          2: res = s[2] - re;
          default: res = s[3] + im;
        endcase
      end
      OP_DFT: begin
        int k = (ph / 2) % 4, re = 0, im = 0;
        for (int n = 0; n < 4; n++)
          case ((k * n) % 4)
            0: re += s[n];
            1: im -= s[n];
            2: re -= s[n];
            default: im += s[n];
          endcase
        res = (ph % 2) ? im : re;
      end
      OP_DCT: begin
        int  u = ph % 4;
        real acc = 0.0;
        for (int n = 0; n < 4; n++) acc += s[n] * $cos((2.0 * n + 1.0) * u * PI / 8.0);
        acc = acc * $sqrt(0.5) * ((u == 0) ? $sqrt(0.5) : 1.0);
        res = $rtoi(acc + 0.5 + 8.0) - 8;
        r.tol = 1'b1;
      end
      default: r.we_out = 1'b0;
    endcase
    r.out = data_t'(res);
    if (w[3:0] <= 4'd7) begin
      int sa, sb, ss;
      r.we_sr = 1'b1;
      r.sr.n = r.out[7];
      r.sr.z = (r.out == 0);
      if (w[3:0] == OP_ADD || w[3:0] == OP_SUB) begin
        sa = int'($signed(8'(xv))); sb = int'($signed(8'(yv)));
        ss = (w[3:0] == OP_ADD) ? sa + sb : sa - sb;
        r.sr.v = (ss > 127) || (ss < -128);
        r.sr.c = (w[3:0] == OP_ADD) ? (xv + yv > 255) : (xv >= yv);
      end
    end
    return r;
  endfunction

  // -------------------------------------------------------------- stimulus
  localparam int N_INSTR = 6000;
  instr_t stream [N_INSTR];
  int     cyc;           // rising edges since reset release
  data_t  exp_out;
  status_t exp_sr;
  eff_t   pend;          // effect of the instruction in execute
  int     k_start;       // stream index at reset release

  initial begin
    repeat (200000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory model: the tb changes cyc only 1 time unit after a rising edge
  always_comb imem_data = stream[(k_start + cyc) % N_INSTR];

  task automatic check_dct2d();
    for (int u = 0; u < 4; u++)
      for (int v = 0; v < 4; v++) begin
        real acc = 0.0, d;
        logic signed [7:0]  fx;
        logic signed [11:0] g;
        for (int x = 0; x < 4; x++)
          for (int y = 0; y < 4; y++) begin
            fx = dct_in[x][y];
            acc += real'(fx) * $cos((2.0 * x + 1.0) * u * PI / 8.0) * $cos((2.0 * y + 1.0) * v * PI / 8.0);
          end
        acc = acc * 0.5 * ((u == 0) ? $sqrt(0.5) : 1.0) * ((v == 0) ? $sqrt(0.5) : 1.0);
        g = dct_out[u][v];
        d = real'(g) - acc;
        checks++;
        if (d > 1.5 || d < -1.5) fail($sformatf("dct2d (%0d,%0d) got %0d ref %f", u, v, g, acc));
      end
    n_dct2d++;
  endtask

  task automatic run(int n_cycles);
    instr_t executing;
    logic   have_exec, executing_prev_fft;
    have_exec = 1'b0;
    executing_prev_fft = 1'b0;
    exp_out = '0; exp_sr = '0;
    cyc = 0;
    @(negedge clk); rst_n = 1'b1;
    for (int t = 0; t < n_cycles; t++) begin
      // address check, before the edge
      checks++;
      if (imem_addr != 3'(cyc)) fail($sformatf("imem_addr %0d at cycle %0d", imem_addr, cyc));
      if (imem_addr == 0 && cyc > 0) n_pc_wrap++;
      @(posedge clk);
      #1;
      // apply the effect of the instruction that was in execute
      if (have_exec) begin
        int o = int'(executing[3:0]);
        pend = model(executing, cyc % 8);   // dsp phase during that cycle
        n_op[o]++;
        if (pend.we_out) exp_out = pend.out;
        else n_rsv_hold++;
        if (pend.we_sr) begin exp_sr = pend.sr; n_sr_upd++; end
        else n_sr_hold++;
        if (pend.we_sr && pend.sr.c && o == OP_ADD) n_carry++;
        if (pend.we_sr && pend.sr.v) n_ovf++;
        if (o == OP_FFT) n_fft_ph[cyc % 4]++;
        if (o == OP_DFT) n_dft_ph[cyc % 8]++;
        if (o == OP_DCT) n_dct_ph[cyc % 4]++;
      end
      executing_prev_fft = have_exec && (executing[3:0] == OP_FFT);
      executing = stream[(k_start + cyc) % N_INSTR];
      have_exec = 1'b1;
      cyc++;
      checks++;
      if (have_exec && pend.tol) begin
        int dd = int'($signed(result)) - int'($signed(exp_out));
        if (dd > 1 || dd < -1) fail($sformatf("cycle %0d DCT result %0d expected %0d", cyc, $signed(result), $signed(exp_out)));
        exp_out = result;
      end else if (result != exp_out) begin
        fail($sformatf("cycle %0d result %b expected %b (ir %h)", cyc, result, exp_out, ir));
      end
      if (have_exec && executing_prev_fft) begin
        checks++;
        if (fft_stream != result) fail($sformatf("cycle %0d fft_stream %b differs from FFT result %b", cyc, fft_stream, result));
      end
      checks++;
      if (status != exp_sr) fail($sformatf("cycle %0d status %b expected %b", cyc, status, exp_sr));
      pend.tol = 1'b0;
      // stand-alone datapaths
      @(negedge clk);
      csa_a = 4'($urandom); csa_b = 4'($urandom); csa_e = 4'($urandom); csa_f = 4'($urandom);
      #1;
      checks++; n_csa++;
      if (int'(csa_s) != int'(csa_a) + int'(csa_b) + int'(csa_e) + int'(csa_f))
        fail($sformatf("csa %0d+%0d+%0d+%0d -> %0d", csa_a, csa_b, csa_e, csa_f, csa_s));
      if (t % 40 == 0) begin
        for (int x = 0; x < 4; x++) for (int y = 0; y < 4; y++) dct_in[x][y] = 8'($urandom);
        #1;
        check_dct2d();
      end
    end
  endtask

  initial begin
    csa_a = '0; csa_b = '0; csa_e = '0; csa_f = '0; dct_in = '0;
    pend = '{default: '0};
    stream[0] = 20'b00110011_00001111_0111;   // SUBTRACT -> 11011100
    stream[1] = 20'b00000000_00110000_1101;   // FFT
    for (int i = 2; i < N_INSTR; i++) stream[i] = 20'($urandom);
    k_start = 0;
    repeat (3) @(posedge clk);

    // the two reference instructions, checked against their printed results
    @(negedge clk); rst_n = 1'b1; cyc = 0;
    @(posedge clk); #1; cyc = 1; @(posedge clk); #1;
    checks++;
    if (result != 8'b11011100) fail($sformatf("reference SUBTRACT gave %b", result));
    @(posedge clk); #1;
    checks++;
    // FFT executed with dsp phase 2: y1_re of (x=00110000, y=0) = 00001100
    if (result != 8'b00001100) fail($sformatf("reference FFT gave %b", result));

    // random stream from the start, after a reset
    rst_n = 1'b0; #1;
    checks++;
    if (imem_addr != 0 || result != 0 || status != 0) fail("reset did not clear the processor");
    run(N_INSTR / 2);

    // reset in mid-run, continue the stream from where it is
    @(negedge clk); rst_n = 1'b0;
    n_reset++;
    k_start = (k_start + cyc) % N_INSTR;
    cyc = 0;
    #1;
    checks++;
    if (imem_addr != 0) fail("PC not 0 after mid-run reset");
    repeat (2) @(posedge clk);
    run(N_INSTR / 2 - 10);

    // coverage of every mechanism
    for (int o = 0; o < 16; o++) if (n_op[o] == 0) fail($sformatf("opcode %0d never executed", o));
    for (int p = 0; p < 4; p++) if (n_fft_ph[p] == 0) fail($sformatf("FFT phase %0d never written", p));
    for (int p = 0; p < 8; p++) if (n_dft_ph[p] == 0) fail($sformatf("DFT phase %0d never written", p));
    for (int p = 0; p < 4; p++) if (n_dct_ph[p] == 0) fail($sformatf("DCT phase %0d never written", p));
    if (n_sr_upd == 0)   fail("status register never updated");
    if (n_sr_hold == 0)  fail("status register never held");
    if (n_rsv_hold == 0) fail("unassigned opcode never held OUTPUT");
    if (n_pc_wrap == 0)  fail("PC never wrapped");
    if (n_carry == 0)    fail("ADD carry never set");
    if (n_ovf == 0)      fail("overflow never set");
    if (n_csa == 0)      fail("carry save adder never checked");
    if (n_dct2d == 0)    fail("2-D DCT never checked");
    if (n_reset == 0)    fail("no mid-run reset");
    $display("coverage: sr_upd=%0d sr_hold=%0d rsv_hold=%0d pc_wrap=%0d carry=%0d ovf=%0d csa=%0d dct2d=%0d reset=%0d",
             n_sr_upd, n_sr_hold, n_rsv_hold, n_pc_wrap, n_carry, n_ovf, n_csa, n_dct2d, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
