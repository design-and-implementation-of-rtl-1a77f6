// control_mux: one of the two 4:1 control multiplexers of the shared bus.
//
// Each one serves a pair of masters: its two select lines are the pair's
// grant lines (GNT0/GNT1 for processors 1 and 2, GNT2/GNT3 for 3 and 4), so
// the select has four codes, hence "4:1". Code {g_hi,g_lo} = 01 passes
// master 0 of the pair, 10 passes master 1, as in the description's grant
// table. Codes 00 (neither granted) and 11 (cannot happen with a one-hot
// arbiter) give an idle request, all zero; that is this design's choice.
// What is switched is the whole bus request of the master (data POUT,
// address and rd/wr), also this design's choice, since the description
// routes only POUT through the multiplexers and leaves the address's path
// open. Combinational.
module control_mux
  import mpsoc_pkg::*;
(
  input  logic     g_lo,   // grant of master 0 of the pair
  input  logic     g_hi,   // grant of master 1 of the pair
  input  bus_req_t in0,
  input  bus_req_t in1,
  output bus_req_t out
);

  always_comb begin
    unique case ({g_hi, g_lo})
      2'b01:   out = in0;
      2'b10:   out = in1;
      default: out = '0;
    endcase
  end

endmodule
