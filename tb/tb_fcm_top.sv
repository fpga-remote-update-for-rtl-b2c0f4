// tb_fcm_top: end-to-end test of the FCM unit at its default parameters, with a
// behavioural N25Q flash on the SPI pins and the host's update software played by
// register accesses.
//
// The flash starts as a board that has already been updated once: switch word ON,
// an initial image at 64 KiB and an old update image at UPD_A. Five updates follow:
//   1. a good update of IMG_BYTES (three 64 KiB sectors, last page partial):
//      expect Done, the new image in place, the switch word ON, the initial image
//      and everything above the area untouched;
//   2. the same with one flash byte failing verification: expect Error (verify),
//      the switch word left erased, so the board would boot the initial image;
//   3. a flash with the wrong JEDEC ID: expect Error (ID) and the flash untouched;
//   4. a first address that is not sector aligned: expect Error (range);
//   5. Enable dropped in the middle of programming: expect the unit back in
//      Initialize and the switch word erased;
//   6. a second good update that restores the switch word.
// The mechanisms the design has are counted and each must occur: host waits on
// Busy, buffer filling up to Busy, multi-sector erase, a partial last page, status
// polls seeing write-in-progress, verify pass, verify fail, ID fail, range fail,
// abort. Expected flash contents come from the image generator, not from the DUT.
module tb_fcm_top;
  import fcm_pkg::*;

  localparam logic [31:0] UPD_A     = 32'h0004_0000;
  localparam int          IMG_BYTES = 2 * 65536 + 1000;
  localparam logic [31:0] INIT_A    = 32'h0001_0000;
  localparam int          INIT_LEN  = 4096;
  localparam int          BURST     = 256;          // host burst = BURST_WORDS default
  localparam longint      WATCHDOG  = 64'd60_000_000;

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

  // mechanism counters
  int m_wait_busy = 0, m_busy_in_program = 0, m_partial_page = 0, m_multi_sector = 0;
  int m_wip_polls = 0, m_verify_pass = 0, m_verify_fail = 0, m_id_fail = 0;
  int m_range_fail = 0, m_abort = 0;

  fcm_top dut (
    .clk, .rst_n, .req_wr, .req_rd, .req_addr, .req_wdata, .rsp_valid, .rsp_rdata,
    .spi_clk, .spi_cs_n, .spi_mosi, .spi_miso, .led_done, .led_error
  );

  spi_flash_model flash (.sck(spi_clk), .cs_n(spi_cs_n), .mosi(spi_mosi), .miso(spi_miso));

  always #4 clk = ~clk;   // 125 MHz
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
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------------ host side
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

  function automatic logic [7:0] img_byte(input int seed, input int i);
    return 8'((i * 7) ^ (i >> 8) * 13 ^ seed * 29 ^ (i >> 16) * 3);
  endfunction

  function automatic logic [31:0] img_word(input int seed, input int w);
    return {img_byte(seed, 4*w+3), img_byte(seed, 4*w+2), img_byte(seed, 4*w+1), img_byte(seed, 4*w)};
  endfunction

  // One update as the host software runs it. abort_at >= 0 drops Enable after
  // that many words. Returns the final STATUS.
  task automatic host_update(input logic [31:0] a, input int nbytes, input int seed,
                             input int abort_at, output logic [31:0] st);
    int w, nwords;
    bit in_prog_busy;
    nwords = nbytes / 4;
    reg_write(REG_ADDR_A, a);
    reg_write(REG_ADDR_B, a + 32'(nbytes) - 1);
    reg_write(REG_CONTROL, 32'h1);
    reg_write(REG_CONTROL, 32'h3);
    w = 0;
    while (w < nwords) begin
      // Flash Ready? loop
      reg_read(REG_STATUS, st);
      if (st[STAT_ERROR]) return;
      if (st[STAT_BUSY]) begin
        m_wait_busy++;
        in_prog_busy = (st[7:4] == STEP_PROGRAM_AREA);
        if (in_prog_busy) m_busy_in_program++;
        repeat (64) @(posedge clk);
        continue;
      end
      for (int k = 0; k < BURST && w < nwords; k++) begin
        if (w == abort_at) begin
          reg_write(REG_CONTROL, 32'h0);
          m_abort++;
          reg_read(REG_STATUS, st);
          return;
        end
        reg_write(REG_DATA, img_word(seed, w));
        w++;
      end
    end
    do begin
      repeat (64) @(posedge clk);
      reg_read(REG_STATUS, st);
    end while (!st[STAT_DONE] && !st[STAT_ERROR]);
  endtask

  function automatic logic [31:0] flash_word(input logic [31:0] a);
    return {flash.rd(a), flash.rd(a+1), flash.rd(a+2), flash.rd(a+3)};
  endfunction

  // What the FPGA configuration logic would pick at power-on.
  function automatic bit boots_update();
    return flash_word(SWITCH_ADDR_DEFAULT) == 32'hAA99_5566;
  endfunction
  localparam logic [31:0] SWITCH_ADDR_DEFAULT = 32'h0;

  function automatic int count_image_mismatch(input logic [31:0] a, input int n, input int seed);
    int bad = 0;
    for (int i = 0; i < n; i++) if (flash.mem.exists(a + 32'(i)) ? flash.mem[a + 32'(i)] != img_byte(seed, i) : img_byte(seed, i) != 8'hFF) bad++;
    return bad;
  endfunction

  function automatic int count_init_mismatch();
    int bad = 0;
    for (int i = 0; i < INIT_LEN; i++) if (flash.rd(INIT_A + 32'(i)) != img_byte(99, i)) bad++;
    return bad;
  endfunction

  logic [31:0] st, v;
  int pp_before, se_before, polls_before, n_pages;

  initial begin
    // ---- preload: a board updated once before
    flash.mem[0] = 8'hAA; flash.mem[1] = 8'h99; flash.mem[2] = 8'h55; flash.mem[3] = 8'h66;
    for (int i = 0; i < INIT_LEN; i++) flash.mem[INIT_A + 32'(i)] = img_byte(99, i);
    for (int i = 0; i < 3 * 65536; i++) flash.mem[UPD_A + 32'(i)] = img_byte(7, i);
    flash.mem[32'h0007_0000] = 8'h5A;   // first byte after the update area's last sector

    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    repeat (5) @(posedge clk);

    reg_read(REG_VERSION, v);
    check(v == 32'h3, "firmware version register");
    reg_read(REG_FIFO_FREE, v);
    check(v == 32'd1024, "empty buffer reports 1024 free words");

    // ---- 1. good update
    pp_before = flash.n_page_program; se_before = flash.n_sector_erase; polls_before = flash.n_busy_polls;
    host_update(UPD_A, IMG_BYTES, 1, -1, st);
    check(st[STAT_DONE] && !st[STAT_ERROR], "update 1 done");
    check(led_done && !led_error, "update 1 LEDs");
    check(count_image_mismatch(UPD_A, IMG_BYTES, 1) == 0, "update 1 image contents");
    check(boots_update(), "update 1 switch word ON");
    check(count_init_mismatch() == 0, "initial image untouched after update 1");
    check(flash.rd(32'h0007_0000) == 8'h5A, "byte above the update area untouched");
    check(flash.n_sector_erase - se_before == 3, "three sectors erased");
    n_pages = (IMG_BYTES + 255) / 256;
    check(flash.n_page_program - pp_before == n_pages + 1, "page programs = image pages + switch word");
    check(flash.n_subsector_erase == 1, "one subsector erase of the switch word");
    check(flash.four_byte, "flash in 4-byte address mode");
    if (flash.n_sector_erase - se_before > 1) m_multi_sector++;
    if (IMG_BYTES % 256 != 0) m_partial_page++;
    if (flash.n_busy_polls > polls_before) m_wip_polls++;
    if (st[STAT_DONE]) m_verify_pass++;

    // ---- 2. a byte fails to program: verify must fail
    flash.corrupt_addr = longint'(UPD_A) + 12345;
    host_update(UPD_A, IMG_BYTES, 2, -1, st);
    check(st[STAT_ERROR] && st[11:8] == ERR_VERIFY, "update 2 verify error");
    check(!led_done && led_error, "update 2 LEDs");
    check(!boots_update() && flash_word(0) == 32'hFFFF_FFFF, "update 2 switch word left erased");
    check(count_init_mismatch() == 0, "initial image untouched after update 2");
    if (st[11:8] == ERR_VERIFY) m_verify_fail++;
    flash.corrupt_addr = -1;
    reg_read(REG_STATUS, v);
    check(v[STAT_BUSY], "busy while in error");
    reg_read(REG_FIFO_FREE, v);
    check(v == 32'd1024, "buffer flushed in error");

    // ---- 3. wrong flash ID
    flash.id_value = 24'h20_BA_18;
    pp_before = flash.n_page_program; se_before = flash.n_sector_erase;
    host_update(UPD_A, IMG_BYTES, 3, -1, st);
    check(st[STAT_ERROR] && st[11:8] == ERR_ID, "update 3 ID error");
    check(flash.n_page_program == pp_before && flash.n_sector_erase == se_before, "update 3 flash untouched");
    if (st[11:8] == ERR_ID) m_id_fail++;
    flash.id_value = 24'h20_BA_19;

    // ---- 4. unaligned first address
    host_update(UPD_A + 32'h100, 1024, 4, -1, st);
    check(st[STAT_ERROR] && st[11:8] == ERR_RANGE, "update 4 range error");
    if (st[11:8] == ERR_RANGE) m_range_fail++;

    // ---- 5. abort in the middle of programming
    host_update(UPD_A, IMG_BYTES, 5, 5000, st);
    repeat (10) @(posedge clk);
    reg_read(REG_STATUS, v);
    check(v[7:4] == STEP_INIT && !v[STAT_ACT], "abort returns to Initialize");
    repeat (200) @(posedge clk);
    check(spi_cs_n, "flash deselected after abort");
    check(!boots_update(), "abort leaves switch word erased");

    // ---- 6. good update again
    host_update(UPD_A, IMG_BYTES, 6, -1, st);
    check(st[STAT_DONE] && !st[STAT_ERROR], "update 6 done");
    check(count_image_mismatch(UPD_A, IMG_BYTES, 6) == 0, "update 6 image contents");
    check(boots_update(), "update 6 switch word ON");
    check(count_init_mismatch() == 0, "initial image untouched after update 6");
    if (st[STAT_DONE]) m_verify_pass++;

    check(flash.violations == 0, "no command refused by the flash");

    // ---- every mechanism must have happened
    $display("mechanisms: wait_busy=%0d busy_in_program=%0d multi_sector=%0d partial_page=%0d wip_polls=%0d verify_pass=%0d verify_fail=%0d id_fail=%0d range_fail=%0d abort=%0d",
             m_wait_busy, m_busy_in_program, m_multi_sector, m_partial_page, m_wip_polls,
             m_verify_pass, m_verify_fail, m_id_fail, m_range_fail, m_abort);
    check(m_wait_busy > 0,       "mechanism: host waited on Busy");
    check(m_busy_in_program > 0, "mechanism: buffer full during programming");
    check(m_multi_sector > 0,    "mechanism: multi-sector erase");
    check(m_partial_page > 0,    "mechanism: partial last page");
    check(m_wip_polls > 0,       "mechanism: write-in-progress polling");
    check(m_verify_pass > 0,     "mechanism: verify pass");
    check(m_verify_fail > 0,     "mechanism: verify fail");
    check(m_id_fail > 0,         "mechanism: ID check fail");
    check(m_range_fail > 0,      "mechanism: range check fail");
    check(m_abort > 0,           "mechanism: abort");
    $display("cycles=%0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
