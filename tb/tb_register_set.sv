// tb_register_set: random writes to OUTPUT and SR with random enables,
// compared each clock with a shadow copy; also checks the reset values.
module tb_register_set;
  import risc_pkg::*;
  logic    clk = 0, rst_n = 0, we_out, we_sr;
  data_t   out_d, out_q, shadow_out;
  status_t sr_d, sr_q, shadow_sr;
  int checks = 0, failures = 0;

  register_set dut (.clk(clk), .rst_n(rst_n), .we_out(we_out), .out_d(out_d),
                    .we_sr(we_sr), .sr_d(sr_d), .out_q(out_q), .sr_q(sr_q));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we_out = 0; we_sr = 0; out_d = '0; sr_d = '0;
    repeat (2) @(posedge clk); #1;
    checks++;
    if (out_q != 0 || sr_q != 0) begin failures++; $display("FAIL reset values"); end
    shadow_out = '0; shadow_sr = '0;
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      we_out = 1'($urandom); we_sr = 1'($urandom);
      out_d = 8'($urandom); sr_d = 4'($urandom);
      if (we_out) shadow_out = out_d;
      if (we_sr)  shadow_sr  = sr_d;
      @(posedge clk); #1;
      checks++;
      if (out_q != shadow_out || sr_q != shadow_sr) begin
        failures++;
        $display("FAIL cycle %0d out=%h/%h sr=%h/%h", i, out_q, shadow_out, sr_q, shadow_sr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
