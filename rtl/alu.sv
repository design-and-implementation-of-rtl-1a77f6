// alu: the processor's arithmetic unit and logic unit, side by side.
//
// Both units see the two 16-bit operands zero-extended to 32 bits and work
// at the same time; the arithmetic unit produces X and the logic unit Y,
// each 32 bits wide, and the control unit after them picks one. That split
// (two 32-bit units, two 32-bit outputs) follows the design description.
// The operations themselves and their codes are this design's choice, since
// the description names none: see arith_op_e and logic_op_e in mpsoc_pkg.
// Purely combinational: X and Y follow a, b and the op codes in the same cycle.
module alu
  import mpsoc_pkg::*;
(
  input  logic [OPND_W-1:0] a,
  input  logic [OPND_W-1:0] b,
  input  arith_op_e         aop,
  input  logic_op_e         lop,
  output logic [DATA_W-1:0] x,   // arithmetic result
  output logic [DATA_W-1:0] y    // logic result
);

  logic [DATA_W-1:0] a32, b32;
  assign a32 = DATA_W'(a);
  assign b32 = DATA_W'(b);

  always_comb begin
    unique case (aop)
      AR_ADD:  x = a32 + b32;
      AR_SUB:  x = a32 - b32;
      AR_MUL:  x = a32 * b32;
      AR_INCA: x = a32 + 1'b1;
      AR_DECA: x = a32 - 1'b1;
      AR_INCB: x = b32 + 1'b1;
      AR_DECB: x = b32 - 1'b1;
      AR_PASA: x = a32;
    endcase
  end

  always_comb begin
    unique case (lop)
      LG_AND: y = a32 & b32;
      LG_OR:  y = a32 | b32;
      LG_XOR: y = a32 ^ b32;
      LG_NOT: y = ~a32;
    endcase
  end

endmodule
