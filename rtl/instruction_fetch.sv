// instruction_fetch: instruction fetch machine.
//
// The program counter is a PC_W-bit up counter (3 bits by default, so eight
// instruction words) with an active-low reset. Its value is the address
// given to the external instruction memory, which returns the 20-bit word
// combinationally on imem_data. On every rising clock edge the word is
// loaded into the instruction register (IR) and the counter advances by one,
// wrapping from its last value to 0. ir_valid tells the decoder that IR holds
// a fetched instruction; it is low only in the first cycle after reset.
//
// Timing: the word at address n is in IR during the cycle after the edge
// that fetched it, so one instruction is fetched per clock. The 3-bit
// counter and its active-low reset are the document's; the one-fetch-per-
// clock timing and the asynchronous memory read are this design's choices.
module instruction_fetch
  import risc_pkg::*;
#(
  parameter int unsigned PC_W = 3
) (
  input  logic            clk,
  input  logic            rst_n,
  output logic [PC_W-1:0] imem_addr,
  input  instr_t          imem_data,
  output instr_t          ir,
  output logic            ir_valid
);
  logic [PC_W-1:0] pc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc       <= '0;
      ir       <= '0;
      ir_valid <= 1'b0;
    end else begin
      pc       <= pc + 1'b1;
      ir       <= imem_data;
      ir_valid <= 1'b1;
    end
  end

  assign imem_addr = pc;
endmodule
