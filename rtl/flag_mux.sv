// flag_mux: the shared bus's third control multiplexer (2:1) and its flag.
//
// The flag is set when GNT0 or GNT1 is high and cleared when GNT2 or GNT3
// is high, and it selects between the outputs of the two 4:1 control
// multiplexers: flag 1 passes the pair of processors 1 and 2, flag 0 the
// pair of processors 3 and 4. That much follows the description.
//
// Timing, this design's choice: the flag is a flip-flop that keeps its value
// while no grant is high, but the multiplexer is steered by the flag's next
// value, so it switches in the same cycle as the grant and the granted
// master's request reaches the decoder without a cycle of delay. The flag
// output shows that same steering value. Reset (synchronous, active high)
// clears the flag.
module flag_mux
  import mpsoc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic [N_MASTERS-1:0] gnt,
  input  bus_req_t             in_lo,  // from control multiplexer 1
  input  bus_req_t             in_hi,  // from control multiplexer 2
  output bus_req_t             out,    // POUT of the bus, to the decoder
  output logic                 flag
);

  logic flag_q;

  always_comb begin
    if      (gnt[0] || gnt[1]) flag = 1'b1;
    else if (gnt[2] || gnt[3]) flag = 1'b0;
    else                       flag = flag_q;
  end

  always_ff @(posedge clk) begin
    if (rst) flag_q <= 1'b0;
    else     flag_q <= flag;
  end

  always_comb out = flag ? in_lo : in_hi;

endmodule
