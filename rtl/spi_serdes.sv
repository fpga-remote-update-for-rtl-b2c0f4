// spi_serdes: byte-level SPI master (SPI SER-DES) between the programming state
// machine and the flash pins.
//
// Its interface carries the signal names of the FCM block diagram: Enable holds
// the flash selected, Start launches one 8-bit exchange of the byte on Send, and
// Done pulses for one clock when the exchange ends, with the byte read from MISO
// on Receive. The flash side is Clk, Select (active low), Mosi and Miso.
//
// Timing (this design's choice, SPI mode 0 as the N25Q flashes accept): SCK idles
// low, MOSI is set up before each rising SCK edge and changed after the falling
// edge, MISO is sampled on the rising edge, most significant bit first. One SCK
// half period lasts SCK_HALF clocks, so a byte takes 16*SCK_HALF clocks from
// Start to Done. Select follows Enable one clock later. Start is ignored while a
// byte is in flight or Enable is low. Between bytes SCK simply rests low with
// Select held, which SPI flashes tolerate, so the caller may pause a transfer
// (for example while waiting for data) without ending the command.
module spi_serdes #(
  parameter int unsigned SCK_HALF = 2     // clocks per SCK half period, >= 1
) (
  input  logic       clk,
  input  logic       rst_n,
  // state machine side
  input  logic       enable,
  input  logic       start,
  input  logic [7:0] send,
  output logic [7:0] receive,
  output logic       done,
  output logic       busy,
  // flash side
  output logic       spi_clk,
  output logic       spi_cs_n,
  output logic       spi_mosi,
  input  logic       spi_miso
);

  localparam int CW = (SCK_HALF > 1) ? $clog2(SCK_HALF) : 1;

  logic [CW-1:0] div_cnt;
  logic [2:0]    bit_cnt;
  logic [7:0]    tx_sh, rx_sh;
  logic          active;

  assign busy = active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt  <= '0;
      bit_cnt  <= '0;
      tx_sh    <= '0;
      rx_sh    <= '0;
      active   <= 1'b0;
      done     <= 1'b0;
      receive  <= '0;
      spi_clk  <= 1'b0;
      spi_cs_n <= 1'b1;
      spi_mosi <= 1'b0;
    end else begin
      done     <= 1'b0;
      spi_cs_n <= ~enable;
      if (!enable) begin
        active  <= 1'b0;
        spi_clk <= 1'b0;
        div_cnt <= '0;
      end else if (!active) begin
        if (start) begin
          active   <= 1'b1;
          tx_sh    <= send;
          spi_mosi <= send[7];
          bit_cnt  <= '0;
          div_cnt  <= '0;
        end
      end else if (div_cnt == CW'(SCK_HALF - 1)) begin
        div_cnt <= '0;
        if (!spi_clk) begin
          spi_clk <= 1'b1;
          rx_sh   <= {rx_sh[6:0], spi_miso};
        end else begin
          spi_clk <= 1'b0;
          bit_cnt <= bit_cnt + 3'd1;
          if (bit_cnt == 3'd7) begin
            active  <= 1'b0;
            done    <= 1'b1;
            receive <= rx_sh;
          end else begin
            tx_sh    <= {tx_sh[6:0], 1'b0};
            spi_mosi <= tx_sh[6];
          end
        end
      end else begin
        div_cnt <= div_cnt + CW'(1);
      end
    end
  end

endmodule
