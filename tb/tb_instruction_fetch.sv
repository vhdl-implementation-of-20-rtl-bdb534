// tb_instruction_fetch: drives the fetch machine from a small instruction
// memory model and checks that the PC counts 0..7 and wraps, that IR holds
// the word of the previous address one clock later, that ir_valid rises one
// clock after reset, and that an active-low reset in mid-run restarts at 0.
module tb_instruction_fetch;
  import risc_pkg::*;
  localparam int PC_W = 3;
  logic            clk = 0, rst_n = 0;
  logic [PC_W-1:0] addr;
  instr_t          data, ir;
  logic            ir_valid;
  instr_t          mem [1 << PC_W];
  int checks = 0, failures = 0;

  instruction_fetch #(.PC_W(PC_W)) dut (
    .clk(clk), .rst_n(rst_n), .imem_addr(addr), .imem_data(data), .ir(ir), .ir_valid(ir_valid));

  assign data = mem[addr];
  always #5 clk = ~clk;

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (mem[i]) mem[i] = 20'($urandom);
    repeat (2) @(posedge clk);
    #1;
    expect_eq("pc in reset", addr, 0);
    expect_eq("ir_valid in reset", ir_valid, 0);
    rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      @(posedge clk); #1;
      expect_eq("pc", addr, (n + 1) % 8);
      expect_eq("ir", ir, mem[n % 8]);
      expect_eq("ir_valid", ir_valid, 1);
    end
    rst_n = 0; #1;
    expect_eq("pc after async reset", addr, 0);
    expect_eq("ir after async reset", ir, 0);
    @(negedge clk); rst_n = 1;
    @(posedge clk); #1;
    expect_eq("pc restart", addr, 1);
    expect_eq("ir restart", ir, mem[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
