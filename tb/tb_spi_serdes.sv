// tb_spi_serdes: checks the SPI SER-DES against an SPI mode-0 slave written in the
// testbench. For random bytes it checks that the slave receives what was sent
// (MSB first, sampled on rising SCK), that Receive returns what the slave sent,
// that Done comes exactly 16*SCK_HALF clocks after Start, that SCK idles low and
// that Select follows Enable.
module tb_spi_serdes;
  localparam int unsigned SCK_HALF = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic enable = 1'b0, start = 1'b0;
  logic [7:0] send = '0, receive;
  logic done, busy;
  logic spi_clk, spi_cs_n, spi_mosi, spi_miso;

  int checks = 0, failures = 0;

  spi_serdes #(.SCK_HALF(SCK_HALF)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mode-0 slave
  logic [7:0] slave_rx, slave_tx, slave_sh;
  always @(posedge spi_clk) if (!spi_cs_n) slave_rx = {slave_rx[6:0], spi_mosi};
  always @(negedge spi_clk) if (!spi_cs_n) begin slave_sh = {slave_sh[6:0], 1'b0}; spi_miso = slave_sh[7]; end

  int n_cycles;
  initial begin
    spi_miso = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check(spi_cs_n && !spi_clk, "idle: deselected, SCK low");
    enable <= 1'b1;
    @(posedge clk);
    @(posedge clk);
    check(!spi_cs_n, "Select follows Enable");
    for (int t = 0; t < 40; t++) begin
      logic [7:0] s, r;
      s = 8'($urandom);
      r = 8'($urandom);
      slave_tx = r;
      slave_sh = r;
      spi_miso = r[7];
      @(negedge clk);
      send  = s;
      start = 1'b1;
      @(posedge clk);
      #1 start = 1'b0;
      n_cycles = 0;
      while (!done) begin
        @(posedge clk);
        #1 n_cycles++;
      end
      check(slave_rx == s, $sformatf("slave got %02h expected %02h", slave_rx, s));
      check(receive == r, $sformatf("receive %02h expected %02h", receive, r));
      check(n_cycles == 16 * SCK_HALF, $sformatf("byte took %0d clocks", n_cycles));
      check(!spi_clk, "SCK low between bytes");
      if (t % 7 == 3) repeat (5) @(posedge clk);   // pause between bytes
    end
    enable <= 1'b0;
    @(posedge clk);
    @(posedge clk);
    check(spi_cs_n, "Select released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
