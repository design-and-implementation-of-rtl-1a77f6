// addr_decoder: the shared bus's 2:4 address decoder.
//
// The two top bits of the bus address pick one of the four RAM slaves; the
// decoder raises that slave's enable and puts the bus data on that slave's
// data lines only (the others see zero). The 2:4 decoding follows the
// description; taking the slave number from address bits [11:10] and
// gating all enables with "a master holds the bus" (valid) are this
// design's choice. The 10-bit word address and rd/wr are shared by all
// slaves and need no decoding. Combinational.
module addr_decoder
  import mpsoc_pkg::*;
(
  input  logic                              valid,
  input  logic [SLV_SEL_W-1:0]              slv,
  input  logic [DATA_W-1:0]                 data,
  output logic [N_SLAVES-1:0]               slv_en,
  output logic [N_SLAVES-1:0][DATA_W-1:0]   slv_data
);

  always_comb begin
    slv_en   = '0;
    slv_data = '0;
    for (int s = 0; s < N_SLAVES; s++) begin
      if (valid && slv == SLV_SEL_W'(s)) begin
        slv_en[s]   = 1'b1;
        slv_data[s] = data;
      end
    end
  end

endmodule
