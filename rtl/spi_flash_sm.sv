// spi_flash_sm: the SPI state machine of the FCM unit, which runs the update
// algorithm on the SPI configuration flash.
//
// After Start (with Enable high) it walks through the steps of the update flow:
//   Initialize    latch the first (A) and last (B) byte address of the update area
//                 and check them;
//   Check ID      read the JEDEC ID and compare it with FLASH_ID;
//   (addr. mode)  for 4-byte addressing, WRITE ENABLE + ENTER 4-BYTE ADDRESS MODE;
//   Erase switch  erase the subsector holding the critical switch word (switch OFF);
//   Erase area    erase every 64 KiB sector from A up to the one holding B;
//   Program area  page-program A..B with bytes taken from the image FIFO, splitting
//                 at 256-byte page boundaries, and fold every byte into a CRC-32;
//   Verify area   read A..B back in one READ command and compare its CRC-32 with
//                 the CRC of what was written;
//   Program switch page-program SWITCH_WORD at SWITCH_ADDR (switch ON);
//   Done          or Error, which leaves the switch word erased so that the FPGA
//                 keeps booting the untouched initial image.
// Every erase and program is preceded by WRITE ENABLE and followed by READ STATUS
// polls until the write-in-progress bit clears.
//
// The step order and their meaning follow the published update method. The way
// each step is carried out (opcodes, one READ for the whole verify, CRC-32 as the
// verify criterion, the range check, the FIFO word byte order) is this design's.
// Image words are sent least significant byte first, i.e. in the byte order of the
// image file as a little-endian host reads it into 32-bit words.
//
// Interface: Enable/Start/Addresses come from the register block, `busy` goes back
// to it (high unless the algorithm is programming and the FIFO can take a burst of
// BURST_WORDS words). ser_* drive the SPI SER-DES (Enable, Start, Send / Done,
// Receive). `done` and `error` are sticky until the next Start. Dropping Enable
// aborts a running update at once and returns to Initialize.
// Timing: one SPI command costs (1 + address + data bytes) byte exchanges plus
// GAP_CYCLES clocks with the flash deselected.
module spi_flash_sm
  import fcm_pkg::*;
#(
  parameter int unsigned ADDR_BYTES   = 4,              // 4 for the 256 Mbit N25Q256
  parameter logic [23:0] FLASH_ID     = 24'h20_BA_19,   // N25Q256 JEDEC manufacturer/type/capacity
  parameter logic [31:0] SWITCH_ADDR  = 32'h0000_0000,
  parameter logic [31:0] SWITCH_WORD  = 32'hAA99_5566,  // switch ON value
  parameter int unsigned SECTOR_BYTES = 65536,
  parameter int unsigned PAGE_BYTES   = 256,
  parameter int unsigned BURST_WORDS  = 256,
  parameter int unsigned GAP_CYCLES   = 4,
  parameter int unsigned FIFO_DEPTH   = 1024
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // PCIe engine side
  input  logic                          enable,
  input  logic                          start,
  input  logic [31:0]                   addr_a,
  input  logic [31:0]                   addr_b,
  output logic                          busy,
  output logic                          active,
  output logic                          done,
  output logic                          error,
  output prog_err_e                     err_code,
  output prog_step_e                    step,
  // image FIFO
  input  logic [31:0]                   fifo_data,
  input  logic                          fifo_empty,
  input  logic [$clog2(FIFO_DEPTH):0]   fifo_free,
  output logic                          fifo_pop,
  output logic                          fifo_flush,
  // SPI SER-DES
  output logic                          ser_enable,
  output logic                          ser_start,
  output logic [7:0]                    ser_send,
  input  logic                          ser_done,
  input  logic [7:0]                    ser_receive,
  input  logic                          ser_busy
);

  typedef enum logic [2:0] {PH_IDLE, PH_CMD, PH_ADDR, PH_DATA, PH_GAP} phase_e;

  localparam int GW = $clog2(GAP_CYCLES + 1);

  // current SPI command
  phase_e      ph;
  logic        issued;          // a byte is in flight in the SER-DES
  logic [7:0]  t_op;
  logic [31:0] t_addr;
  logic        t_use_addr;
  logic [31:0] t_len;           // data-phase bytes left
  logic        t_in;            // data phase reads
  logic        t_sw;            // data phase sends SWITCH_WORD instead of FIFO bytes
  logic [1:0]  a_idx;
  logic [GW-1:0] gap_cnt;
  logic [23:0] rx_sh;

  // algorithm
  logic [1:0]  sub;
  logic [31:0] a_q, b_q, cur;
  logic [1:0]  b_idx;           // byte of the FIFO head word to send next
  logic [31:0] crc_wr, crc_rd;

  logic [32:0] next_sector;
  logic [31:0] page_left, area_left, plen;
  logic        wip;
  logic [1:0]  sw_idx;          // switch word byte, most significant first

  assign active      = (step != STEP_INIT) && (step != STEP_DONE) && (step != STEP_ERROR);
  assign busy        = !((step == STEP_PROGRAM_AREA) && (fifo_free >= ($clog2(FIFO_DEPTH)+1)'(BURST_WORDS)));
  assign next_sector = {1'b0, cur} + 33'(SECTOR_BYTES);
  assign page_left   = 32'(PAGE_BYTES) - (cur & 32'(PAGE_BYTES - 1));
  assign area_left   = b_q - cur + 32'd1;
  assign plen        = (page_left < area_left) ? page_left : area_left;
  assign wip         = rx_sh[0];
  assign sw_idx      = t_len[1:0] - 2'd1;

  // Byte sent in the current phase.
  function automatic logic [7:0] addr_byte(input logic [31:0] a, input logic [1:0] i);
    return a[8*i +: 8];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph         <= PH_IDLE;
      issued     <= 1'b0;
      t_op       <= '0;
      t_addr     <= '0;
      t_use_addr <= 1'b0;
      t_len      <= '0;
      t_in       <= 1'b0;
      t_sw       <= 1'b0;
      a_idx      <= '0;
      gap_cnt    <= '0;
      rx_sh      <= '0;
      sub        <= '0;
      a_q        <= '0;
      b_q        <= '0;
      cur        <= '0;
      b_idx      <= '0;
      crc_wr     <= '1;
      crc_rd     <= '1;
      step       <= STEP_INIT;
      done       <= 1'b0;
      error      <= 1'b0;
      err_code   <= ERR_NONE;
      fifo_pop   <= 1'b0;
      fifo_flush <= 1'b1;
      ser_enable <= 1'b0;
      ser_start  <= 1'b0;
      ser_send   <= '0;
    end else begin
      ser_start  <= 1'b0;
      fifo_pop   <= 1'b0;
      fifo_flush <= (step == STEP_ERROR);

      if (!enable) begin
        // abort: deselect the flash, empty the buffer, back to Initialize
        ph         <= PH_IDLE;
        issued     <= 1'b0;
        ser_enable <= 1'b0;
        fifo_flush <= 1'b1;
        if (active) step <= STEP_INIT;
      end else begin
        // ------------------------------------------------ SPI command engine
        unique case (ph)
          PH_IDLE: ;
          PH_CMD: begin
            if (!issued && !ser_busy) begin
              ser_start <= 1'b1;
              ser_send  <= t_op;
              issued    <= 1'b1;
            end else if (ser_done) begin
              issued <= 1'b0;
              if (t_use_addr)      begin ph <= PH_ADDR; a_idx <= 2'(ADDR_BYTES - 1); end
              else if (t_len != 0) ph <= PH_DATA;
              else                 ph <= PH_GAP;
            end
          end
          PH_ADDR: begin
            if (!issued && !ser_busy) begin
              ser_start <= 1'b1;
              ser_send  <= addr_byte(t_addr, a_idx);
              issued    <= 1'b1;
            end else if (ser_done) begin
              issued <= 1'b0;
              if (a_idx != 0)      a_idx <= a_idx - 2'd1;
              else if (t_len != 0) ph <= PH_DATA;
              else                 ph <= PH_GAP;
            end
          end
          PH_DATA: begin
            if (!issued && !ser_busy) begin
              if (t_in) begin
                ser_start <= 1'b1;
                ser_send  <= 8'h00;
                issued    <= 1'b1;
              end else if (t_sw) begin
                ser_start <= 1'b1;
                ser_send  <= SWITCH_WORD[8*sw_idx +: 8];
                issued    <= 1'b1;
              end else if (!fifo_empty && !fifo_pop) begin
                ser_start <= 1'b1;
                ser_send  <= fifo_data[8*b_idx +: 8];
                crc_wr    <= crc32_byte(crc_wr, fifo_data[8*b_idx +: 8]);
                issued    <= 1'b1;
                b_idx     <= b_idx + 2'd1;
                if (b_idx == 2'd3) fifo_pop <= 1'b1;
              end
            end else if (ser_done) begin
              issued <= 1'b0;
              if (t_in) begin
                rx_sh <= {rx_sh[15:0], ser_receive};
                if (step == STEP_VERIFY_AREA) crc_rd <= crc32_byte(crc_rd, ser_receive);
              end
              t_len <= t_len - 32'd1;
              if (t_len == 32'd1) ph <= PH_GAP;
            end
          end
          PH_GAP: begin
            ser_enable <= 1'b0;
            if (gap_cnt == GW'(GAP_CYCLES)) begin
              gap_cnt <= '0;
              ph      <= PH_IDLE;
            end else begin
              gap_cnt <= gap_cnt + GW'(1);
            end
          end
          default: ph <= PH_IDLE;
        endcase

        // ------------------------------------------------ update algorithm
        if (ph == PH_IDLE) begin
          unique case (step)
            STEP_INIT, STEP_DONE, STEP_ERROR: begin
              if (start) begin
                a_q        <= addr_a;
                b_q        <= addr_b;
                done       <= 1'b0;
                error      <= 1'b0;
                err_code   <= ERR_NONE;
                fifo_flush <= 1'b1;
                sub        <= '0;
                if ((addr_a & 32'(SECTOR_BYTES - 1)) != 0 || addr_b < addr_a ||
                    ((addr_b - addr_a + 32'd1) & 32'd3) != 0) begin
                  step     <= STEP_ERROR;
                  error    <= 1'b1;
                  err_code <= ERR_RANGE;
                end else begin
                  step <= STEP_CHECK_ID;
                end
              end
            end

            STEP_CHECK_ID: begin
              if (sub == 0) begin
                launch(CMD_READ_ID, 1'b0, '0, 32'd3, 1'b1, 1'b0);
                sub <= 2'd1;
              end else if (rx_sh == FLASH_ID) begin
                step <= (ADDR_BYTES == 4) ? STEP_ADDR_MODE : STEP_ERASE_SWITCH;
                sub  <= '0;
              end else begin
                fail(ERR_ID);
              end
            end

            STEP_ADDR_MODE: begin
              unique case (sub)
                2'd0: begin launch(CMD_WRITE_ENABLE, 1'b0, '0, '0, 1'b0, 1'b0); sub <= 2'd1; end
                2'd1: begin launch(CMD_ENTER_4B, 1'b0, '0, '0, 1'b0, 1'b0);     sub <= 2'd2; end
                default: begin step <= STEP_ERASE_SWITCH; sub <= '0; end
              endcase
            end

            STEP_ERASE_SWITCH: begin
              unique case (sub)
                2'd0: begin launch(CMD_WRITE_ENABLE, 1'b0, '0, '0, 1'b0, 1'b0); sub <= 2'd1; end
                2'd1: begin launch(CMD_SUBSECT_ERASE, 1'b1, SWITCH_ADDR, '0, 1'b0, 1'b0); sub <= 2'd2; end
                2'd2: begin launch(CMD_READ_STATUS, 1'b0, '0, 32'd1, 1'b1, 1'b0); sub <= 2'd3; end
                default: begin
                  if (wip) launch(CMD_READ_STATUS, 1'b0, '0, 32'd1, 1'b1, 1'b0);
                  else begin
                    step <= STEP_ERASE_AREA;
                    sub  <= '0;
                    cur  <= a_q;
                  end
                end
              endcase
            end

            STEP_ERASE_AREA: begin
              unique case (sub)
                2'd0: begin launch(CMD_WRITE_ENABLE, 1'b0, '0, '0, 1'b0, 1'b0); sub <= 2'd1; end
                2'd1: begin launch(CMD_SECTOR_ERASE, 1'b1, cur, '0, 1'b0, 1'b0); sub <= 2'd2; end
                2'd2: begin launch(CMD_READ_STATUS, 1'b0, '0, 32'd1, 1'b1, 1'b0); sub <= 2'd3; end
                default: begin
                  if (wip) launch(CMD_READ_STATUS, 1'b0, '0, 32'd1, 1'b1, 1'b0);
                  else begin
                    sub <= '0;
                    if (next_sector > {1'b0, b_q}) begin
                      step   <= STEP_PROGRAM_AREA;
                      cur    <= a_q;
                      b_idx  <= '0;
                      crc_wr <= '1;
                    end else begin
                      cur <= next_sector[31:0];
                    end
                  end
                end
              endcase
            end

            STEP_PROGRAM_AREA: begin
              unique case (sub)
                2'd0: begin launch(CMD_WRITE_ENABLE, 1'b0, '0, '0, 1'b0, 1'b0); sub <= 2'd1; end
                2'd1: begin
                  launch(CMD_PAGE_PROGRAM, 1'b1, cur, plen, 1'b0, 1'b0);
                  cur <= cur + plen;
                  sub <= 2'd2;
                end
                2'd2: begin launch(CMD_READ_STATUS, 1'b0, '0, 32'd1, 1'b1, 1'b0); sub <= 2'd3; end
                default: begin
                  if (wip) launch(CMD_READ_STATUS, 1'b0, '0, 32'd1, 1'b1, 1'b0);
                  else begin
                    sub <= '0;
                    if ({1'b0, cur} > {1'b0, b_q}) begin
                      step   <= STEP_VERIFY_AREA;
                      crc_rd <= '1;
                    end
                  end
                end
              endcase
            end

            STEP_VERIFY_AREA: begin
              if (sub == 0) begin
                launch(CMD_READ, 1'b1, a_q, b_q - a_q + 32'd1, 1'b1, 1'b0);
                sub <= 2'd1;
              end else if (crc_rd == crc_wr) begin
                step <= STEP_PROGRAM_SW;
                sub  <= '0;
              end else begin
                fail(ERR_VERIFY);
              end
            end

            STEP_PROGRAM_SW: begin
              unique case (sub)
                2'd0: begin launch(CMD_WRITE_ENABLE, 1'b0, '0, '0, 1'b0, 1'b0); sub <= 2'd1; end
                2'd1: begin launch(CMD_PAGE_PROGRAM, 1'b1, SWITCH_ADDR, 32'd4, 1'b0, 1'b1); sub <= 2'd2; end
                2'd2: begin launch(CMD_READ_STATUS, 1'b0, '0, 32'd1, 1'b1, 1'b0); sub <= 2'd3; end
                default: begin
                  if (wip) launch(CMD_READ_STATUS, 1'b0, '0, 32'd1, 1'b1, 1'b0);
                  else begin
                    step <= STEP_DONE;
                    done <= 1'b1;
                    sub  <= '0;
                  end
                end
              endcase
            end

            default: step <= STEP_INIT;
          endcase
        end
      end
    end
  end

  // Start one SPI command; the engine returns to PH_IDLE when it has ended.
  task automatic launch(input logic [7:0] op, input logic use_addr, input logic [31:0] addr,
                        input logic [31:0] len, input logic rd, input logic sw);
    t_op       <= op;
    t_use_addr <= use_addr;
    t_addr     <= addr;
    t_len      <= len;
    t_in       <= rd;
    t_sw       <= sw;
    ser_enable <= 1'b1;
    ph         <= PH_CMD;
  endtask

  task automatic fail(input prog_err_e code);
    step     <= STEP_ERROR;
    error    <= 1'b1;
    err_code <= code;
    sub      <= '0;
  endtask

  // The flash stays selected for the whole of a command and is released between commands.
  property p_select_in_command;
    @(posedge clk) disable iff (!rst_n || !enable) (ph == PH_ADDR || ph == PH_DATA) |-> ser_enable;
  endproperty
  assert property (p_select_in_command) else $error("spi_flash_sm: flash deselected inside a command");

endmodule
