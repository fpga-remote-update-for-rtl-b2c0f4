// tb_flash_programmer: the flash programmer (state machine + SER-DES) driving a
// behavioural N25Q flash over real SPI pins, configured for the 128 Mbit part of
// the development board: 3-byte addresses and JEDEC ID 20 BA 18. The image FIFO is
// a queue fed by the testbench whenever Busy is low, in bursts of BURST_WORDS.
// Checks: Done, the image bytes in the flash, the switch word, that the bytes
// below and above the update area are untouched, two sectors erased, the flash
// left in 3-byte mode, no command refused by the flash, and that SPI bytes are
// 16*SCK_HALF clocks long (SCK period measured on the pin).
module tb_flash_programmer;
  import fcm_pkg::*;

  localparam logic [31:0] A  = 32'h0010_0000;
  localparam int          NB = 65536 + 512;

  logic clk = 1'b0, rst_n = 1'b0;
  logic enable = 1'b0, start = 1'b0;
  logic [31:0] addr_a = A, addr_b = A + NB - 1;
  logic busy, active, done, error;
  prog_err_e err_code;
  prog_step_e step;
  logic [31:0] fifo_data;
  logic fifo_empty;
  logic [10:0] fifo_free;
  logic fifo_pop, fifo_flush;
  logic spi_clk, spi_cs_n, spi_mosi, spi_miso;

  int checks = 0, failures = 0;
  longint cycles = 0;

  flash_programmer #(.ADDR_BYTES(3), .FLASH_ID(24'h20_BA_18)) dut (.*);
  spi_flash_model #(.ID(24'h20_BA_18)) flash (.sck(spi_clk), .cs_n(spi_cs_n), .mosi(spi_mosi), .miso(spi_miso));

  always #4 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [7:0] img(input int i);
    return 8'((i >> 3) ^ (i * 5) ^ 8'h3C);
  endfunction

  logic [31:0] q[$];
  assign fifo_empty = (q.size() == 0);
  assign fifo_data  = fifo_empty ? 32'h0 : q[0];
  assign fifo_free  = 11'(1024 - q.size());
  always @(posedge clk) begin
    if (fifo_flush) q.delete();
    else if (fifo_pop && q.size() != 0) void'(q.pop_front());
  end

  // SCK period on the pin
  longint last_rise = -1, period = -1;
  int     bad_period = 0;
  int     bit_i = 0;
  always @(negedge spi_cs_n) bit_i = 0;
  always @(posedge spi_clk) begin
    bit_i++;
    if ((bit_i - 1) % 8 != 0) begin   // not the first bit of a byte
      if (period < 0) period = cycles - last_rise;
      else if (cycles - last_rise != period) bad_period++;
    end
    last_rise = cycles;
  end

  int w = 0;
  initial begin
    flash.mem[A - 1] = 8'h11;
    flash.mem[A + NB + 65536] = 8'h22;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    enable = 1'b1;
    repeat (3) @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (w < NB / 4) begin
      @(negedge clk);
      if (!busy) for (int k = 0; k < 256 && w < NB / 4; k++, w++)
        q.push_back({img(4*w+3), img(4*w+2), img(4*w+1), img(4*w)});
    end
    while (active) @(negedge clk);
    check(done && !error, $sformatf("done (err %0d)", err_code));
    begin
      int bad = 0;
      for (int i = 0; i < NB; i++) if (flash.rd(A + 32'(i)) != img(i)) bad++;
      check(bad == 0, $sformatf("%0d image bytes wrong", bad));
    end
    check({flash.rd(0), flash.rd(1), flash.rd(2), flash.rd(3)} == 32'hAA99_5566, "switch word ON");
    check(flash.rd(A - 1) == 8'h11, "byte below the area untouched");
    check(flash.rd(A + NB + 65536) == 8'h22, "byte above the area untouched");
    check(flash.n_sector_erase == 2, "two sectors erased");
    check(flash.n_subsector_erase == 1, "switch subsector erased");
    check(!flash.four_byte, "3-byte address mode kept");
    check(flash.violations == 0, "no command refused");
    check(period == 2 * 2, $sformatf("SCK period %0d clocks", period));
    check(bad_period == 0, "SCK period constant inside bytes");
    check(flash.n_read == 1, "one READ command for the whole verify");
    $display("cycles=%0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
