// register_set: the processor's result registers.
//
// OUTPUT is the 8-bit result register the processor presents to the outside
// world; it is loaded with out_d when we_out is high. SR is the status
// register {N, Z, V, C}; it is loaded with sr_d when we_sr is high, which the
// processor does for operations that take two operands. Both registers are
// cleared by the active-low reset and change on the rising clock edge.
//
// The 8-bit OUTPUT and the rule that two-operand operations update SR are the
// document's; the flag layout is this design's. The instruction register and
// program counter live in the fetch machine.
module register_set
  import risc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    we_out,
  input  data_t   out_d,
  input  logic    we_sr,
  input  status_t sr_d,
  output data_t   out_q,
  output status_t sr_q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_q <= '0;
      sr_q  <= '0;
    end else begin
      if (we_out) out_q <= out_d;
      if (we_sr)  sr_q  <= sr_d;
    end
  end
endmodule
