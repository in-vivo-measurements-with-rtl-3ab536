// nrec_pkg: constants shared by the FPGA interface of the 64-channel neural
// recording ASIC.
//
// Command frames sent to the ASIC are 24 bits: a 5-bit preamble, a 14-bit
// payload and a 5-bit CRC, shifted out MSB first. Data frames received from
// the ASIC are 85 bits: an 8-bit preamble, a 72-bit information packet
// (2-bit mode, 6-bit row/column identifier, eight 8-bit samples) and a 5-bit
// CRC. These widths follow the original system. The frame is stored as ten bytes:
// nine information bytes MSB first and a tenth byte {3'b000, crc}; that byte
// layout and the host register map below are this design's own choices.
package nrec_pkg;

  // command path
  localparam int unsigned CMD_PRE_BITS     = 5;
  localparam int unsigned CMD_PAYLOAD_BITS = 14;
  localparam int unsigned CMD_CRC_BITS     = 5;
  localparam int unsigned CMD_BITS = CMD_PRE_BITS + CMD_PAYLOAD_BITS + CMD_CRC_BITS;

  // data path
  localparam int unsigned FRAME_PRE_BITS  = 8;
  localparam int unsigned FRAME_INFO_BITS = 72;
  localparam int unsigned FRAME_CRC_BITS  = 5;
  localparam int unsigned FRAME_BITS = FRAME_PRE_BITS + FRAME_INFO_BITS + FRAME_CRC_BITS;
  localparam int unsigned CHANNELS_PER_FRAME = 8;
  localparam int unsigned SAMPLE_BITS        = 8;
  // bytes stored per frame: 9 information bytes + 1 CRC byte
  localparam int unsigned FRAME_BYTES = FRAME_INFO_BITS / 8 + 1;

  // host register map (EPP address register values)
  typedef enum logic [7:0] {
    REG_CMD2   = 8'h00,  // command bits [23:16]
    REG_CMD1   = 8'h01,  // command bits [15:8]
    REG_CMD0   = 8'h02,  // command bits [7:0]; writing it sends the command
    REG_FIFO   = 8'h03,  // read: next byte of the recording FIFO (popped)
    REG_STATUS = 8'h04,  // read: {5'b0, cmd_busy, fifo_full, fifo_empty}
    REG_LVL_LO = 8'h05,  // read: FIFO fill level [7:0]
    REG_LVL_HI = 8'h06,  // read: FIFO fill level [15:8]
    REG_DROP   = 8'h07   // read: frames dropped on a full FIFO (mod 256)
  } reg_addr_e;

endpackage
