// processor: one master of the MPSoC, a small soft processing element.
//
// Two 16-bit operands a and b go straight into the ALU, whose arithmetic
// unit and logic unit both produce 32-bit results X and Y. The control unit
// (a 2:1 multiplexer) passes one of them on as P_IN, and a 32-bit PIPO
// register clocks it out as P_OUT, the value the master offers to the
// shared bus. This chain (input ports, ALU, control unit, PIPO) follows the
// design description; the 6-bit select layout and the operation set are this
// design's own (see mpsoc_pkg::proc_sel_t).
//
// Timing: P_OUT holds f(a, b, sel) of the previous rising edge, one cycle of
// latency, one new result per cycle.
module processor
  import mpsoc_pkg::*;
(
  input  logic              clk,
  input  logic              rst,    // synchronous, active high
  input  logic [OPND_W-1:0] a,
  input  logic [OPND_W-1:0] b,
  input  proc_sel_t         sel,
  output logic [DATA_W-1:0] p_out
);

  logic [DATA_W-1:0] x, y, p_in;

  alu u_alu (
    .a   (a),
    .b   (b),
    .aop (sel.aop),
    .lop (sel.lop),
    .x   (x),
    .y   (y)
  );

  control_unit u_cu (
    .unit_sel (sel.unit),
    .x        (x),
    .y        (y),
    .p_in     (p_in)
  );

  pipo_reg #(.WIDTH(DATA_W)) u_pipo (
    .clk   (clk),
    .rst   (rst),
    .p_in  (p_in),
    .p_out (p_out)
  );

endmodule
