// mpsoc_top: a four-master, four-slave MPSoC on one shared bus.
//
// Four processors (masters) each turn two 16-bit operands into a 32-bit
// result held in a PIPO register. Each master also has a request line, a
// 12-bit bus address and a rd/wr line, brought in from outside: the
// description leaves open what drives them. The shared bus grants one
// requesting master at a time by fixed priority (master 0 first) and passes
// that master's result, address and rd/wr to the RAM slave picked by the
// address's top two bits. The four RAM slaves (32-bit words, 10-bit word
// address, DEPTH words each) write the result when rd/wr is 0 and read onto
// their own output DTOUT when rd/wr is 1.
//
// RAM_DEPTH sets the words per slave; ARB_ROUND_ROBIN = 1 replaces the
// fixed-priority arbitration by round robin.
//
// Timing: operands and select at edge t give P_OUT after t; a request seen
// at edge t is granted during cycle t..t+1 and its write lands at edge t+1;
// a read's data is on DTOUT after edge t+1 and holds until that slave's next
// read. Clock and reset are common to all blocks; reset is synchronous and
// active high and clears the processor results, the grants and the flag
// (RAM contents are not reset).
module mpsoc_top
  import mpsoc_pkg::*;
#(
  parameter int unsigned RAM_DEPTH       = 768,
  parameter bit          ARB_ROUND_ROBIN = 1'b0
) (
  input  logic                             clk,
  input  logic                             rst,
  // masters
  input  logic      [N_MASTERS-1:0][OPND_W-1:0]     a,
  input  logic      [N_MASTERS-1:0][OPND_W-1:0]     b,
  input  proc_sel_t [N_MASTERS-1:0]                 sel,
  input  logic      [N_MASTERS-1:0]                 req,
  input  logic      [N_MASTERS-1:0][BUS_ADDR_W-1:0] addr,
  input  logic      [N_MASTERS-1:0]                 rd_wr,
  output logic      [N_MASTERS-1:0][DATA_W-1:0]     p_out,
  // bus
  output logic      [N_MASTERS-1:0]                 gnt,
  output logic                                      flag,
  // slaves
  output logic      [N_SLAVES-1:0][DATA_W-1:0]      dtout
);

  bus_req_t [N_MASTERS-1:0]        mreq;
  logic     [N_SLAVES-1:0]         slv_en;
  logic                            slv_rd_wr;
  logic     [RAM_ADDR_W-1:0]       slv_addr;
  logic     [N_SLAVES-1:0][DATA_W-1:0] slv_data;

  for (genvar m = 0; m < N_MASTERS; m++) begin : g_master
    processor u_proc (
      .clk   (clk),
      .rst   (rst),
      .a     (a[m]),
      .b     (b[m]),
      .sel   (sel[m]),
      .p_out (p_out[m])
    );
    assign mreq[m] = '{rd_wr: rd_wr[m], addr: addr[m], data: p_out[m]};
  end

  shared_bus #(.ARB_ROUND_ROBIN(ARB_ROUND_ROBIN)) u_bus (
    .clk       (clk),
    .rst       (rst),
    .req       (req),
    .mreq      (mreq),
    .gnt       (gnt),
    .flag      (flag),
    .slv_en    (slv_en),
    .slv_rd_wr (slv_rd_wr),
    .slv_addr  (slv_addr),
    .slv_data  (slv_data)
  );

  for (genvar s = 0; s < N_SLAVES; s++) begin : g_slave
    ram #(.DATA_W(DATA_W), .ADDR_W(RAM_ADDR_W), .DEPTH(RAM_DEPTH)) u_ram (
      .clk      (clk),
      .en       (slv_en[s]),
      .rd_wr    (slv_rd_wr),
      .addr     (slv_addr),
      .data_in  (slv_data[s]),
      .data_out (dtout[s])
    );
  end

endmodule
