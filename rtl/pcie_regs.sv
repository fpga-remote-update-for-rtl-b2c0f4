// pcie_regs: register interface of the PCIe engine, the window through which the
// host's update software drives the FCM unit.
//
// The PCIe endpoint core (vendor IP) decodes memory-write and memory-read TLPs
// aimed at its BAR and presents them here as single 32-bit register accesses:
// req_wr/req_rd with a byte offset, write data, and a read answer one clock later
// on rsp_valid/rsp_rdata. From these writes the block produces the signals of the
// FCM block diagram: Enable (level), Start (one-clock pulse), the two update
// Addresses (first and last byte of the update image area) and File, the image
// words pushed into the buffer FIFO. Reads return the firmware version, the
// control and address registers, the FIFO free count and a STATUS word with Busy,
// Done and Error (see fcm_pkg for the bit layout).
//
// The existence of these signals and of the version register is published; the
// offsets, widths and bit positions are this design's own choice.
module pcie_regs
  import fcm_pkg::*;
#(
  parameter logic [31:0] FW_VERSION = 32'h0000_0003,
  parameter int unsigned FIFO_DEPTH = 1024
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // register accesses from the endpoint core
  input  logic                         req_wr,
  input  logic                         req_rd,
  input  logic [7:0]                   req_addr,
  input  logic [31:0]                  req_wdata,
  output logic                         rsp_valid,
  output logic [31:0]                  rsp_rdata,
  // towards the SPI state machine and the FIFO
  output logic                         enable,
  output logic                         start,
  output logic [31:0]                  addr_a,
  output logic [31:0]                  addr_b,
  output logic                         file_wr,
  output logic [31:0]                  file_data,
  // status back from the flash programmer
  input  logic                         busy,
  input  logic                         active,
  input  logic                         done,
  input  logic                         error,
  input  prog_err_e                    err_code,
  input  prog_step_e                   step,
  input  logic [$clog2(FIFO_DEPTH):0]  fifo_free
);

  logic [31:0] status;

  always_comb begin
    status              = '0;
    status[STAT_BUSY]   = busy;
    status[STAT_DONE]   = done;
    status[STAT_ERROR]  = error;
    status[STAT_ACT]    = active;
    status[7:4]         = step;
    status[11:8]        = err_code;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enable    <= 1'b0;
      start     <= 1'b0;
      addr_a    <= '0;
      addr_b    <= '0;
      file_wr   <= 1'b0;
      file_data <= '0;
      rsp_valid <= 1'b0;
      rsp_rdata <= '0;
    end else begin
      start     <= 1'b0;
      file_wr   <= 1'b0;
      rsp_valid <= 1'b0;
      if (req_wr) begin
        unique case (req_addr)
          REG_CONTROL: begin
            enable <= req_wdata[0];
            start  <= req_wdata[1] & req_wdata[0];
          end
          REG_ADDR_A: addr_a <= req_wdata;
          REG_ADDR_B: addr_b <= req_wdata;
          REG_DATA: begin
            file_wr   <= 1'b1;
            file_data <= req_wdata;
          end
          default: ;   // read-only or unmapped: ignored
        endcase
      end
      if (req_rd) begin
        rsp_valid <= 1'b1;
        unique case (req_addr)
          REG_VERSION:   rsp_rdata <= FW_VERSION;
          REG_CONTROL:   rsp_rdata <= {31'd0, enable};
          REG_ADDR_A:    rsp_rdata <= addr_a;
          REG_ADDR_B:    rsp_rdata <= addr_b;
          REG_STATUS:    rsp_rdata <= status;
          REG_FIFO_FREE: rsp_rdata <= 32'(fifo_free);
          default:       rsp_rdata <= '0;
        endcase
      end
    end
  end

  property p_one_access; @(posedge clk) disable iff (!rst_n) !(req_wr && req_rd); endproperty
  assert property (p_one_access) else $error("pcie_regs: read and write in the same clock");

endmodule
