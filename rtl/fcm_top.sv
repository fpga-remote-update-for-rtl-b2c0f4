// fcm_top: FPGA Code Management (FCM) unit, the logic that every FPGA image must
// carry so that the next image can be written into the board's SPI configuration
// flash from a remote host over PCIe.
//
// The flash holds a header with a critical switch word, an initial image that is
// never touched, and an update image area. The host writes the first and last
// address of the update area, sets Enable, issues Start, waits for Busy to drop and
// streams the new image as 32-bit words. The words are buffered in a FIFO while the
// flash is erasing or programming a page. The flash programmer switches the header
// OFF, erases and programs the update area, verifies it, and only then programs the
// switch word ON. Any failure, or a power loss during the update, leaves the switch
// OFF, so the FPGA boots the initial image at the next power-on.
//
// Ports: a register-access port standing for the user side of the PCIe endpoint
// core (req_*/rsp_*, register map in fcm_pkg), the four SPI flash pins, and Done
// and Error for LEDs. All logic runs on the one clock of that user interface.
// The block structure (PCIe engine, buffer FIFO, SPI state machine, SPI SER-DES)
// follows the published design; parameters give the board's 256 Mbit N25Q flash
// and this design's choices for buffer depth, burst size and SPI clock rate.
module fcm_top
  import fcm_pkg::*;
#(
  parameter logic [31:0] FW_VERSION   = 32'h0000_0003,
  parameter int unsigned ADDR_BYTES   = 4,
  parameter logic [23:0] FLASH_ID     = 24'h20_BA_19,
  parameter logic [31:0] SWITCH_ADDR  = 32'h0000_0000,
  parameter logic [31:0] SWITCH_WORD  = 32'hAA99_5566,
  parameter int unsigned SECTOR_BYTES = 65536,
  parameter int unsigned PAGE_BYTES   = 256,
  parameter int unsigned FIFO_DEPTH   = 1024,
  parameter int unsigned BURST_WORDS  = 256,
  parameter int unsigned GAP_CYCLES   = 4,
  parameter int unsigned SCK_HALF     = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // register accesses from the PCIe endpoint core
  input  logic        req_wr,
  input  logic        req_rd,
  input  logic [7:0]  req_addr,
  input  logic [31:0] req_wdata,
  output logic        rsp_valid,
  output logic [31:0] rsp_rdata,
  // SPI configuration flash
  output logic        spi_clk,
  output logic        spi_cs_n,
  output logic        spi_mosi,
  input  logic        spi_miso,
  // LEDs
  output logic        led_done,
  output logic        led_error
);

  localparam int FW = $clog2(FIFO_DEPTH) + 1;

  logic              enable, start, file_wr;
  logic [31:0]       addr_a, addr_b, file_data;
  logic              busy, active, done, error;
  prog_err_e         err_code;
  prog_step_e        step;
  logic [31:0]       fifo_data;
  logic              fifo_empty, fifo_full, fifo_pop, fifo_flush;
  logic [FW-1:0]     fifo_count, fifo_free;

  pcie_regs #(.FW_VERSION(FW_VERSION), .FIFO_DEPTH(FIFO_DEPTH)) u_regs (
    .clk, .rst_n, .req_wr, .req_rd, .req_addr, .req_wdata, .rsp_valid, .rsp_rdata,
    .enable, .start, .addr_a, .addr_b, .file_wr, .file_data,
    .busy, .active, .done, .error, .err_code, .step, .fifo_free
  );

  update_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .flush   (fifo_flush),
    .wr_en   (file_wr),
    .wr_data (file_data),
    .rd_en   (fifo_pop),
    .rd_data (fifo_data),
    .empty   (fifo_empty),
    .full    (fifo_full),
    .count   (fifo_count),
    .free    (fifo_free)
  );

  flash_programmer #(
    .ADDR_BYTES  (ADDR_BYTES),
    .FLASH_ID    (FLASH_ID),
    .SWITCH_ADDR (SWITCH_ADDR),
    .SWITCH_WORD (SWITCH_WORD),
    .SECTOR_BYTES(SECTOR_BYTES),
    .PAGE_BYTES  (PAGE_BYTES),
    .BURST_WORDS (BURST_WORDS),
    .GAP_CYCLES  (GAP_CYCLES),
    .SCK_HALF    (SCK_HALF),
    .FIFO_DEPTH  (FIFO_DEPTH)
  ) u_prog (
    .clk, .rst_n, .enable, .start, .addr_a, .addr_b,
    .busy, .active, .done, .error, .err_code, .step,
    .fifo_data, .fifo_empty, .fifo_free, .fifo_pop, .fifo_flush,
    .spi_clk, .spi_cs_n, .spi_mosi, .spi_miso
  );

  assign led_done  = done;
  assign led_error = error;

  // A word written while the buffer is full is lost: the host must honour Busy.
  property p_no_overflow; @(posedge clk) disable iff (!rst_n) file_wr |-> !fifo_full; endproperty
  assert property (p_no_overflow) else $error("fcm_top: image word written into a full buffer");

endmodule
