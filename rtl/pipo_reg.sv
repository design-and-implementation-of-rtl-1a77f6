// pipo_reg: parallel-in, parallel-out register holding a processor's result.
//
// A row of WIDTH D flip-flops on one clock, as the description has it
// (32 by default): on every rising edge P_OUT takes P_IN, so the result of
// the ALU appears on P_OUT one cycle after the operands and select lines.
// The synchronous, active-high reset to zero is this design's addition so
// that P_OUT is defined before the first load.
module pipo_reg #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] p_in,
  output logic [WIDTH-1:0] p_out
);

  always_ff @(posedge clk) begin
    if (rst) p_out <= '0;
    else     p_out <= p_in;
  end

endmodule
