// fcm_pkg: types and constants shared by the FPGA Code Management (FCM) unit.
//
// The FCM unit reprograms the update image area of an SPI configuration flash on
// commands from a host PC reached over PCIe. This package holds
//   * the BAR register offsets seen by the host (a design choice: the register map
//     is not published, only the signals it carries: Addresses, Start, Enable, File,
//     Busy, Done, Error and a firmware version register),
//   * the SPI NOR command opcodes of the Micron/Numonyx N25Q family used on the
//     target boards (standard N25Q values, not listed with the design itself),
//   * the states of the programming algorithm, named after its steps,
//   * a byte-wise CRC-32 used to check the update area after programming.
package fcm_pkg;

  // ---------------------------------------------------------------- register map
  // Byte offsets inside the BAR window; all registers are 32 bits wide.
  localparam logic [7:0] REG_VERSION   = 8'h00;  // RO  firmware version
  localparam logic [7:0] REG_CONTROL   = 8'h04;  // RW  bit0 enable, bit1 start (write 1, self clearing)
  localparam logic [7:0] REG_ADDR_A    = 8'h08;  // RW  first byte address of the update area
  localparam logic [7:0] REG_ADDR_B    = 8'h0C;  // RW  last byte address of the update area
  localparam logic [7:0] REG_DATA      = 8'h10;  // WO  one 32-bit word of the update image
  localparam logic [7:0] REG_STATUS    = 8'h14;  // RO  see STAT_* below
  localparam logic [7:0] REG_FIFO_FREE = 8'h18;  // RO  free words in the buffer

  localparam int STAT_BUSY  = 0;   // buffer cannot take another burst
  localparam int STAT_DONE  = 1;   // update finished and switch word programmed
  localparam int STAT_ERROR = 2;   // update aborted, switch word left erased
  localparam int STAT_ACT   = 3;   // programming algorithm running
  localparam int STAT_STEP  = 4;   // bits [7:4]: current step (prog_step_e)

  // ---------------------------------------------------------------- SPI opcodes
  localparam logic [7:0] CMD_READ_ID      = 8'h9F;
  localparam logic [7:0] CMD_WRITE_ENABLE = 8'h06;
  localparam logic [7:0] CMD_READ_STATUS  = 8'h05;
  localparam logic [7:0] CMD_ENTER_4B     = 8'hB7;
  localparam logic [7:0] CMD_SUBSECT_ERASE= 8'h20;  // 4 KiB
  localparam logic [7:0] CMD_SECTOR_ERASE = 8'hD8;  // 64 KiB
  localparam logic [7:0] CMD_PAGE_PROGRAM = 8'h02;  // up to 256 bytes
  localparam logic [7:0] CMD_READ         = 8'h03;

  // ---------------------------------------------------------------- algorithm
  typedef enum logic [3:0] {
    STEP_INIT         = 4'd0,   // idle, waiting for Start
    STEP_CHECK_ID     = 4'd1,
    STEP_ADDR_MODE    = 4'd2,   // switch the flash to 4-byte addresses
    STEP_ERASE_SWITCH = 4'd3,
    STEP_ERASE_AREA   = 4'd4,
    STEP_PROGRAM_AREA = 4'd5,
    STEP_VERIFY_AREA  = 4'd6,
    STEP_PROGRAM_SW   = 4'd7,
    STEP_DONE         = 4'd8,
    STEP_ERROR        = 4'd9
  } prog_step_e;

  // Cause of an error, readable in STATUS bits [11:8].
  typedef enum logic [3:0] {
    ERR_NONE   = 4'd0,
    ERR_ID     = 4'd1,   // flash JEDEC ID differs from the expected one
    ERR_RANGE  = 4'd2,   // A not sector aligned, B below A, or length not whole words
    ERR_VERIFY = 4'd3    // read-back CRC differs from the CRC of the written data
  } prog_err_e;

  // ---------------------------------------------------------------- CRC-32
  // IEEE 802.3 polynomial, reflected form 0xEDB88320, one byte per call.
  // The caller starts from 32'hFFFF_FFFF; the register is compared without final
  // inversion, which is enough to compare two streams.
  function automatic logic [31:0] crc32_byte(input logic [31:0] crc, input logic [7:0] data);
    logic [31:0] c;
    c = crc ^ {24'd0, data};
    for (int i = 0; i < 8; i++) begin
      c = c[0] ? ((c >> 1) ^ 32'hEDB8_8320) : (c >> 1);
    end
    return c;
  endfunction

endpackage
