// flash_programmer: the Flash Programmer of the FCM unit, i.e. the SPI state
// machine running the update algorithm plus the SPI SER-DES that moves its bytes
// on and off the flash pins.
//
// Between the two run the SER-DES handshake signals of the block diagram (Enable,
// Start, Send, Done, Receive). Upstream it takes Enable, Start and the two update
// Addresses, reads image words from the buffer FIFO, and reports Busy, Done and
// Error (Done and Error also drive board LEDs). Downstream it drives the SPI
// flash: Clk, Select (active low), Mosi, and reads Miso. In the FPGA the SPI clock
// reaches the configuration clock pin through the device's startup primitive,
// which lies outside this block. Timing is set by SCK_HALF (SER-DES) and
// GAP_CYCLES (deselect time between commands); see the two submodules.
module flash_programmer
  import fcm_pkg::*;
#(
  parameter int unsigned ADDR_BYTES   = 4,
  parameter logic [23:0] FLASH_ID     = 24'h20_BA_19,
  parameter logic [31:0] SWITCH_ADDR  = 32'h0000_0000,
  parameter logic [31:0] SWITCH_WORD  = 32'hAA99_5566,
  parameter int unsigned SECTOR_BYTES = 65536,
  parameter int unsigned PAGE_BYTES   = 256,
  parameter int unsigned BURST_WORDS  = 256,
  parameter int unsigned GAP_CYCLES   = 4,
  parameter int unsigned SCK_HALF     = 2,
  parameter int unsigned FIFO_DEPTH   = 1024
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         enable,
  input  logic                         start,
  input  logic [31:0]                  addr_a,
  input  logic [31:0]                  addr_b,
  output logic                         busy,
  output logic                         active,
  output logic                         done,
  output logic                         error,
  output prog_err_e                    err_code,
  output prog_step_e                   step,
  input  logic [31:0]                  fifo_data,
  input  logic                         fifo_empty,
  input  logic [$clog2(FIFO_DEPTH):0]  fifo_free,
  output logic                         fifo_pop,
  output logic                         fifo_flush,
  output logic                         spi_clk,
  output logic                         spi_cs_n,
  output logic                         spi_mosi,
  input  logic                         spi_miso
);

  logic       ser_enable, ser_start, ser_done, ser_busy;
  logic [7:0] ser_send, ser_receive;

  spi_flash_sm #(
    .ADDR_BYTES  (ADDR_BYTES),
    .FLASH_ID    (FLASH_ID),
    .SWITCH_ADDR (SWITCH_ADDR),
    .SWITCH_WORD (SWITCH_WORD),
    .SECTOR_BYTES(SECTOR_BYTES),
    .PAGE_BYTES  (PAGE_BYTES),
    .BURST_WORDS (BURST_WORDS),
    .GAP_CYCLES  (GAP_CYCLES),
    .FIFO_DEPTH  (FIFO_DEPTH)
  ) u_sm (
    .clk, .rst_n, .enable, .start, .addr_a, .addr_b,
    .busy, .active, .done, .error, .err_code, .step,
    .fifo_data, .fifo_empty, .fifo_free, .fifo_pop, .fifo_flush,
    .ser_enable, .ser_start, .ser_send, .ser_done, .ser_receive, .ser_busy
  );

  spi_serdes #(.SCK_HALF(SCK_HALF)) u_serdes (
    .clk, .rst_n,
    .enable  (ser_enable),
    .start   (ser_start),
    .send    (ser_send),
    .receive (ser_receive),
    .done    (ser_done),
    .busy    (ser_busy),
    .spi_clk, .spi_cs_n, .spi_mosi, .spi_miso
  );

endmodule
