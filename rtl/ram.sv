// ram: one RAM slave, a synchronous single-port memory of 32-bit words.
//
// Ports follow the description: clock, enable, rd/wr, a 10-bit address,
// 32-bit data in and 32-bit data out. On a rising edge with en high the RAM
// writes data_in to word addr when rd_wr is 0, and reads word addr onto
// data_out when rd_wr is 1 (data_out is registered, so read data appears one
// cycle after the request and then holds). With en low nothing changes.
//
// Depth: the description gives a 10-bit address, a capacity of "nearly 3
// kilobytes" and a depth of 3072; DEPTH defaults to 768 words (768 x 4 bytes
// = 3072 bytes), which fits a 10-bit address. Addresses at or above DEPTH
// are this design's choice: writes are dropped and reads return zero.
// There is no reset; memory contents are undefined until written.
module ram #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned DEPTH  = 768
) (
  input  logic              clk,
  input  logic              en,
  input  logic              rd_wr,    // 0 write, 1 read
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] data_in,
  output logic [DATA_W-1:0] data_out
);

  logic [DATA_W-1:0] mem [DEPTH];
  logic              in_range;

  assign in_range = 32'(addr) < DEPTH;

  always_ff @(posedge clk) begin
    if (en) begin
      if (!rd_wr) begin
        if (in_range) mem[addr] <= data_in;
      end else begin
        data_out <= in_range ? mem[addr] : '0;
      end
    end
  end

  initial begin
    assert (DEPTH <= (1 << ADDR_W))
      else $error("ram: DEPTH %0d does not fit a %0d-bit address", DEPTH, ADDR_W);
  end

endmodule
