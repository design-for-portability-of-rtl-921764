// comblock_pkg: constants shared by the communication block (ComBlock) and the
// logic around it.
//
// The ComBlock presents the same word-addressed map to the processor (uP) and to
// the FPGA fabric:
//   0x00..0x0F  M2F registers   (written by the uP, read by the FPGA)
//   0x10..0x1F  F2M registers   (written by the FPGA, read by the uP)
//   0x20        M2F FIFO        (uP writes data; a uP read returns FIFO status)
//   0x21        F2M FIFO        (uP reads data)
//   0x22..      TDPRAM          (true dual port RAM, 2**RAM_AW words)
// The offsets are the document's. The status word at a read of 0x20, the flag bit
// positions and the choice of the last two registers for the transfer protocol
// are this design's own.
package comblock_pkg;

  // Word offsets of the map.
  localparam int unsigned M2F_REG_BASE  = 32'h00;
  localparam int unsigned F2M_REG_BASE  = 32'h10;
  localparam int unsigned REG_SLOTS     = 16;
  localparam int unsigned M2F_FIFO_ADDR = 32'h20;
  localparam int unsigned F2M_FIFO_ADDR = 32'h21;
  localparam int unsigned RAM_BASE      = 32'h22;

  // Registers reserved for the flags-based transfer protocol (logical level).
  localparam int unsigned FLAG_REG = 15;  // flags of the writing side
  localparam int unsigned LEN_REG  = 14;  // number of words placed in the TDPRAM

  // Bits of the FPGA flag word (F2M register FLAG_REG).
  localparam int unsigned FPGA_BUSY_BIT   = 0;  // FPGA-TDPRAM-busy
  localparam int unsigned READY_FOR_UP_BIT = 1; // data-ready-for-uP
  // Bits of the uP flag word (M2F register FLAG_REG).
  localparam int unsigned UP_BUSY_BIT      = 0; // uP-TDPRAM-busy
  localparam int unsigned READY_FOR_FPGA_BIT = 1; // data-ready-for-FPGA

  // Bits of the FIFO status word returned by a uP read of M2F_FIFO_ADDR.
  localparam int unsigned ST_M2F_FULL      = 0;
  localparam int unsigned ST_M2F_AFULL     = 1;
  localparam int unsigned ST_M2F_OVERFLOW  = 2;
  localparam int unsigned ST_F2M_EMPTY     = 3;
  localparam int unsigned ST_F2M_AEMPTY    = 4;
  localparam int unsigned ST_F2M_UNDERFLOW = 5;

  // AXI4-Lite response codes.
  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_SLVERR = 2'b10
  } axi_resp_e;

endpackage
