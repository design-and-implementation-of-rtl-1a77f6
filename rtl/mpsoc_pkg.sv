// mpsoc_pkg: widths, select-field layout and the bus request record shared by
// the processors, the shared bus and the RAM slaves of the four-master,
// four-slave shared-bus MPSoC.
//
// Fixed by the design description: 16-bit processor operands, 32-bit
// processor results and bus data, four masters, four slaves, a 10-bit RAM
// word address and a 2:4 slave decoder. Chosen here: a 12-bit bus address
// whose two top bits pick the slave, the 6-bit select layout below and the
// ALU operation codes.
package mpsoc_pkg;

  localparam int unsigned N_MASTERS  = 4;
  localparam int unsigned N_SLAVES   = 4;
  localparam int unsigned OPND_W     = 16;  // processor inputs a, b
  localparam int unsigned DATA_W     = 32;  // ALU, PIPO, bus and RAM data
  localparam int unsigned RAM_ADDR_W = 10;  // RAM word address
  localparam int unsigned SLV_SEL_W  = 2;   // 2:4 address decoder input
  localparam int unsigned BUS_ADDR_W = SLV_SEL_W + RAM_ADDR_W;

  // Arithmetic unit operation, select[2:0].
  typedef enum logic [2:0] {
    AR_ADD  = 3'b000,  // a + b
    AR_SUB  = 3'b001,  // a - b (two's complement, 32 bits)
    AR_MUL  = 3'b010,  // a * b (full 32-bit product)
    AR_INCA = 3'b011,  // a + 1
    AR_DECA = 3'b100,  // a - 1
    AR_INCB = 3'b101,  // b + 1
    AR_DECB = 3'b110,  // b - 1
    AR_PASA = 3'b111   // a
  } arith_op_e;

  // Logic unit operation, select[4:3].
  typedef enum logic [1:0] {
    LG_AND = 2'b00,
    LG_OR  = 2'b01,
    LG_XOR = 2'b10,
    LG_NOT = 2'b11     // ~a over the 32-bit zero-extended operand
  } logic_op_e;

  // Processor select lines: unit picks the control-unit (2:1 mux) input,
  // 1 = arithmetic result X, 0 = logic result Y.
  typedef struct packed {
    logic      unit;
    logic_op_e lop;
    arith_op_e aop;
  } proc_sel_t;

  // What one master offers to the shared bus.
  typedef struct packed {
    logic                  rd_wr;  // 0 write, 1 read (the RAM's convention)
    logic [BUS_ADDR_W-1:0] addr;   // [11:10] slave, [9:0] word
    logic [DATA_W-1:0]     data;   // processor output POUT
  } bus_req_t;

endpackage
