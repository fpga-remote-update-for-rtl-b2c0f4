// tb_fcm_fig5_image: the field update as reported for the target module: a
// 3,145,728-byte update image sent as 786,432 32-bit words into the 256 Mbit
// N25Q256 flash, with the FCM unit at its default parameters.
//
// Flash layout used here: header sector at 0, initial image from 64 KiB (only its
// first and last 4 KiB are loaded, as markers), update area from UPD_A, sector
// aligned above the initial image. The host waits on Busy and sends 256-word
// bursts. Checks: Done, every byte of the update area, the switch word ON, the
// initial-image markers untouched, 48 sectors erased, 12,288 + 1 page programs,
// and that the clocks spent per image byte stay within the budget of one byte
// written and one byte read on SPI (32 + 32 clocks), two handshake clocks per SPI byte and command overhead: under 74 clocks per byte.
module tb_fcm_fig5_image;
  import fcm_pkg::*;

  localparam int          IMG_BYTES = 3_145_728;
  localparam logic [31:0] INIT_A    = 32'h0001_0000;
  localparam logic [31:0] UPD_A     = 32'h0032_0000;
  localparam int          MARK      = 4096;
  localparam longint      WATCHDOG  = 64'd400_000_000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic req_wr = 1'b0, req_rd = 1'b0;
  logic [7:0]  req_addr = '0;
  logic [31:0] req_wdata = '0;
  logic        rsp_valid;
  logic [31:0] rsp_rdata;
  logic        spi_clk, spi_cs_n, spi_mosi, spi_miso;
  logic        led_done, led_error;

  int checks = 0, failures = 0;
  longint cycles = 0;

  fcm_top dut (.*);
  spi_flash_model flash (.sck(spi_clk), .cs_n(spi_cs_n), .mosi(spi_mosi), .miso(spi_miso));

  always #4 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    @(posedge clk);
    while (cycles < WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic reg_write(input logic [7:0] a, input logic [31:0] d);
    @(posedge clk);
    req_wr <= 1'b1; req_addr <= a; req_wdata <= d;
    @(posedge clk);
    req_wr <= 1'b0;
  endtask

  task automatic reg_read(input logic [7:0] a, output logic [31:0] d);
    @(posedge clk);
    req_rd <= 1'b1; req_addr <= a;
    @(posedge clk);
    req_rd <= 1'b0;
    while (!rsp_valid) @(posedge clk);
    d = rsp_rdata;
  endtask

  function automatic logic [7:0] img_byte(input int i);
    return 8'((i * 13) ^ (i >> 9) ^ (i >> 17) * 5);
  endfunction

  function automatic logic [7:0] init_byte(input int i);
    return 8'(i ^ 8'hA5);
  endfunction

  logic [31:0] st;
  longint t_start, t_end;
  int bad;

  initial begin
    for (int i = 0; i < MARK; i++) begin
      flash.mem[INIT_A + 32'(i)] = init_byte(i);
      flash.mem[UPD_A - MARK + 32'(i)] = init_byte(i + 7);
    end
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    repeat (5) @(posedge clk);

    t_start = cycles;
    reg_write(REG_ADDR_A, UPD_A);
    reg_write(REG_ADDR_B, UPD_A + 32'(IMG_BYTES) - 1);
    reg_write(REG_CONTROL, 32'h1);
    reg_write(REG_CONTROL, 32'h3);
    for (int w = 0; w < IMG_BYTES / 4; ) begin
      reg_read(REG_STATUS, st);
      if (st[STAT_ERROR]) break;
      if (st[STAT_BUSY]) begin
        repeat (256) @(posedge clk);
        continue;
      end
      for (int k = 0; k < 256 && w < IMG_BYTES / 4; k++, w++)
        reg_write(REG_DATA, {img_byte(4*w+3), img_byte(4*w+2), img_byte(4*w+1), img_byte(4*w)});
    end
    do begin
      repeat (256) @(posedge clk);
      reg_read(REG_STATUS, st);
    end while (!st[STAT_DONE] && !st[STAT_ERROR]);
    t_end = cycles;

    check(st[STAT_DONE] && !st[STAT_ERROR], $sformatf("update done, status %h", st));
    bad = 0;
    for (int i = 0; i < IMG_BYTES; i++) if (flash.rd(UPD_A + 32'(i)) != img_byte(i)) bad++;
    check(bad == 0, $sformatf("%0d image bytes wrong", bad));
    check({flash.rd(0), flash.rd(1), flash.rd(2), flash.rd(3)} == 32'hAA99_5566, "switch word ON");
    bad = 0;
    for (int i = 0; i < MARK; i++) begin
      if (flash.rd(INIT_A + 32'(i)) != init_byte(i)) bad++;
      if (flash.rd(UPD_A - MARK + 32'(i)) != init_byte(i + 7)) bad++;
    end
    check(bad == 0, "initial image markers untouched");
    check(flash.n_sector_erase == IMG_BYTES / 65536, $sformatf("%0d sectors erased", flash.n_sector_erase));
    check(flash.n_page_program == IMG_BYTES / 256 + 1, $sformatf("%0d page programs", flash.n_page_program));
    check(flash.violations == 0, "no command refused");
    check(t_end - t_start < 64'(IMG_BYTES) * 74, $sformatf("%0d clocks for %0d bytes", t_end - t_start, IMG_BYTES));
    check(t_end - t_start > 64'(IMG_BYTES) * 64, "at least one write and one read SPI byte per image byte");
    $display("update took %0d clocks (%0d us at 125 MHz, flash busy times excluded)", t_end - t_start, (t_end - t_start) / 125);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
