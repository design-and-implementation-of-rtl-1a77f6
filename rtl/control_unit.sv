// control_unit: the processor's 2:1 multiplexer between the arithmetic
// result X and the logic result Y.
//
// The description makes the control unit a 2:1 multiplexer switching
// between the two 32-bit ALU outputs on a selection line; which level of the
// line picks which output is this design's choice (1 = X, 0 = Y).
// Combinational; its output P_IN feeds the PIPO register.
module control_unit
  import mpsoc_pkg::*;
(
  input  logic              unit_sel,  // 1: arithmetic X, 0: logic Y
  input  logic [DATA_W-1:0] x,
  input  logic [DATA_W-1:0] y,
  output logic [DATA_W-1:0] p_in
);

  always_comb p_in = unit_sel ? x : y;

endmodule
