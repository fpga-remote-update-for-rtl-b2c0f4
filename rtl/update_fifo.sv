// update_fifo: synchronous first-word-fall-through FIFO that buffers 32-bit words
// of the update image between the PCIe register interface and the SPI programming
// state machine.
//
// The host may push image words while the flash is still erasing or busy with a
// page program; the state machine pops them as it feeds the SPI flash. The head
// word is always visible on rd_data while empty is low (first word fall-through),
// so a pop takes effect in the same clock the word is used. A push when full and a
// pop when empty are ignored. flush empties the FIFO in one clock. `free` counts
// the free entries so the host side can tell whether a whole burst fits.
// The buffer exists in the original system as a vendor FIFO core; its depth is not
// given, and DEPTH = 1024 words (one 36 Kbit block RAM at 32 bits) is this
// design's choice. DEPTH must be a power of two.
module update_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     flush,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH):0]   count,
  output logic [$clog2(DEPTH):0]   free
);

  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign empty   = (count == '0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign free    = (AW+1)'(DEPTH) - count;
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else if (flush) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= wr_ptr + AW'(1);
      if (do_rd) rd_ptr <= rd_ptr + AW'(1);
      case ({do_wr, do_rd})
        2'b10:   count <= count + (AW+1)'(1);
        2'b01:   count <= count - (AW+1)'(1);
        default: ;
      endcase
    end
  end

  // A pop on an empty FIFO or a push on a full one points at a caller bug.
  property p_no_underflow; @(posedge clk) disable iff (!rst_n) !(rd_en && empty && !flush); endproperty
  assert property (p_no_underflow) else $error("update_fifo: pop while empty");

endmodule
