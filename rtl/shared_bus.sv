// shared_bus: the single 32-bit bus that four masters share to reach four
// RAM slaves.
//
// It is built, as the description has it, from an arbiter, three control
// multiplexers and a 2:4 address decoder. The arbiter turns REQ0..REQ3 into
// one-hot grants with fixed priority (master 0 highest). Control
// multiplexer 1 passes the request of master 0 or 1 under GNT0/GNT1,
// multiplexer 2 that of master 2 or 3 under GNT2/GNT3, and the 2:1
// multiplexer 3 picks between them by a flag that GNT0/GNT1 set and
// GNT2/GNT3 clear. The resulting bus request goes to the address decoder,
// which enables the addressed slave and steers the data to it.
//
// ARB_ROUND_ROBIN = 1 swaps the fixed priority for round robin (see arbiter).
//
// Interface: per master a request line and a bus_req_t (POUT data, 12-bit
// address, rd/wr); per slave an enable and its data lines, with the 10-bit
// word address and rd/wr common to all slaves.
//
// Timing: a request seen at a rising edge is granted from that edge on; for
// the whole cycle the grant is high, the granted master's request drives
// the slave side, so a RAM write lands at the edge that ends that cycle.
module shared_bus
  import mpsoc_pkg::*;
#(
  parameter bit ARB_ROUND_ROBIN = 1'b0   // 0: fixed priority, 1: round robin
) (
  input  logic                            clk,
  input  logic                            rst,
  input  logic [N_MASTERS-1:0]            req,
  input  bus_req_t [N_MASTERS-1:0]        mreq,
  output logic [N_MASTERS-1:0]            gnt,
  output logic                            flag,
  output logic [N_SLAVES-1:0]             slv_en,
  output logic                            slv_rd_wr,
  output logic [RAM_ADDR_W-1:0]           slv_addr,
  output logic [N_SLAVES-1:0][DATA_W-1:0] slv_data
);

  bus_req_t pair_lo, pair_hi, pout;

  arbiter #(.N(N_MASTERS), .ROUND_ROBIN(ARB_ROUND_ROBIN)) u_arb (
    .clk (clk),
    .rst (rst),
    .req (req),
    .gnt (gnt)
  );

  control_mux u_cmux1 (
    .g_lo (gnt[0]),
    .g_hi (gnt[1]),
    .in0  (mreq[0]),
    .in1  (mreq[1]),
    .out  (pair_lo)
  );

  control_mux u_cmux2 (
    .g_lo (gnt[2]),
    .g_hi (gnt[3]),
    .in0  (mreq[2]),
    .in1  (mreq[3]),
    .out  (pair_hi)
  );

  flag_mux u_cmux3 (
    .clk   (clk),
    .rst   (rst),
    .gnt   (gnt),
    .in_lo (pair_lo),
    .in_hi (pair_hi),
    .out   (pout),
    .flag  (flag)
  );

  addr_decoder u_dec (
    .valid    (|gnt),
    .slv      (pout.addr[BUS_ADDR_W-1 -: SLV_SEL_W]),
    .data     (pout.data),
    .slv_en   (slv_en),
    .slv_data (slv_data)
  );

  assign slv_rd_wr = pout.rd_wr;
  assign slv_addr  = pout.addr[RAM_ADDR_W-1:0];

endmodule
