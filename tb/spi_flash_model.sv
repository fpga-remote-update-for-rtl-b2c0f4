// spi_flash_model: behavioural model of a Micron/Numonyx N25Q serial NOR flash,
// the configuration memory of the target boards, for simulation only.
//
// SPI mode 0: MOSI is sampled on rising SCK, MISO changes on falling SCK. Commands
// modelled: READ ID (9Fh), READ STATUS (05h), WRITE ENABLE (06h), ENTER 4-BYTE
// ADDRESS MODE (B7h), SUBSECTOR ERASE (20h, 4 KiB), SECTOR ERASE (D8h, 64 KiB),
// PAGE PROGRAM (02h, wraps inside its 256-byte page), READ (03h). Erase and program
// need the write-enable latch, act when Select rises, clear the latch and keep the
// write-in-progress bit set for the next BUSY_POLLS status reads (time is counted
// in polls, not in nanoseconds). Programming only clears bits, as in NOR flash.
// The array is sparse: bytes never written read as FFh. Counters record what the
// flash was asked to do, and `violations` counts commands a real part would have
// refused (no write enable, sent while busy, page overrun, incomplete command).
// `corrupt_addr` makes READ return one byte with bit 0 inverted, to stand for a
// cell that failed to program.
module spi_flash_model #(
  parameter logic [23:0] ID         = 24'h20_BA_19,
  parameter int unsigned BUSY_POLLS = 3
) (
  input  logic sck,
  input  logic cs_n,
  input  logic mosi,
  output logic miso
);

  logic [7:0] mem [int unsigned];

  // state visible to testbenches
  int          n_subsector_erase = 0;
  int          n_sector_erase    = 0;
  int          n_page_program    = 0;
  int          n_read            = 0;
  int          n_busy_polls      = 0;
  int          violations        = 0;
  longint      corrupt_addr      = -1;
  logic        four_byte         = 1'b0;
  logic [23:0] id_value          = ID;     // may be changed by a testbench

  logic        wel = 1'b0;
  int          busy_cnt = 0;

  // current command
  logic [7:0]  sh_in;
  int          bit_n, byte_n;
  logic [7:0]  cmd;
  logic [31:0] addr;
  logic [7:0]  out_sh;
  logic [7:0]  page_buf [int unsigned];
  int          n_data;
  int unsigned size, base;

  function automatic logic [7:0] rd(input logic [31:0] a);
    logic [7:0] v;
    v = mem.exists(a) ? mem[a] : 8'hFF;
    if (longint'(a) == corrupt_addr) v = v ^ 8'h01;
    return v;
  endfunction

  function automatic int abytes();
    return four_byte ? 4 : 3;
  endfunction

  function automatic logic [7:0] status();
    return {6'd0, wel, busy_cnt != 0};
  endfunction

  initial miso = 1'b0;

  always @(negedge cs_n) begin
    bit_n  = 0;
    byte_n = 0;
    addr   = '0;
    n_data = 0;
    page_buf.delete();
  end

  always @(posedge sck) begin
    if (!cs_n) begin
      sh_in = {sh_in[6:0], mosi};
      bit_n++;
      if (bit_n == 8) begin
        bit_n = 0;
        take_byte(sh_in);
        byte_n++;
      end
    end
  end

  always @(negedge sck) begin
    if (!cs_n) begin
      miso   <= out_sh[7];
      out_sh = {out_sh[6:0], 1'b0};
    end
  end

  task automatic take_byte(input logic [7:0] b);
    if (byte_n == 0) begin
      cmd = b;
      if (busy_cnt != 0 && b != 8'h05) violations++;
      case (b)
        8'h9F: out_sh = id_value[23:16];
        8'h05: out_sh = status();
        default: out_sh = 8'h00;
      endcase
    end else begin
      case (cmd)
        8'h9F: out_sh = (byte_n == 1) ? id_value[15:8] : id_value[7:0];
        8'h05: out_sh = status();
        8'h20, 8'hD8, 8'h02, 8'h03: begin
          if (byte_n <= abytes()) begin
            addr = {addr[23:0], b};
            if (byte_n == abytes() && cmd == 8'h03) out_sh = rd(addr);
            if (byte_n == abytes() && !four_byte) addr[31:24] = 8'h00;
          end else if (cmd == 8'h03) begin
            addr   = addr + 1;
            out_sh = rd(addr);
          end else if (cmd == 8'h02) begin
            page_buf[{addr[31:8], 8'h00} + ((addr[7:0] + n_data) & 8'hFF)] = b;
            n_data++;
          end
        end
        default: ;
      endcase
    end
  endtask

  always @(posedge cs_n) begin
    case (cmd)
      8'h06: if (byte_n == 1) wel = 1'b1;
      8'h05: if (busy_cnt != 0) begin busy_cnt--; n_busy_polls++; end
      8'h03: n_read++;
      8'hB7: begin
        if (!wel) violations++;
        four_byte = 1'b1;
        wel = 1'b0;
      end
      8'h20, 8'hD8: begin
        if (!wel || byte_n != 1 + abytes()) violations++;
        else begin
          size = (cmd == 8'h20) ? 4096 : 65536;
          base = addr & ~(size - 1);
          for (int unsigned i = 0; i < size; i++) if (mem.exists(base + i)) mem.delete(base + i);
          if (cmd == 8'h20) n_subsector_erase++; else n_sector_erase++;
          busy_cnt = BUSY_POLLS;
        end
        wel = 1'b0;
      end
      8'h02: begin
        if (!wel || byte_n < 1 + abytes() || n_data > 256) violations++;
        else begin
          if (int'(addr[7:0]) + n_data > 256) violations++;
          foreach (page_buf[a]) mem[a] = (mem.exists(a) ? mem[a] : 8'hFF) & page_buf[a];
          n_page_program++;
          busy_cnt = BUSY_POLLS;
        end
        wel = 1'b0;
      end
      default: ;
    endcase
    cmd = 8'h00;
  end

endmodule
