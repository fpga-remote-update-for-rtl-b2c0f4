// tb_update_fifo: random pushes and pops against a queue model of the FIFO. Checks
// the head word (first-word fall-through), empty, full, the free count, that a push
// on a full FIFO is dropped, and flush. Uses a depth of 16 to reach full often.
module tb_update_fifo;
  localparam int DEPTH = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic flush = 1'b0, wr_en = 1'b0, rd_en = 1'b0;
  logic [31:0] wr_data = '0, rd_data;
  logic empty, full;
  logic [4:0] count, free;

  int checks = 0, failures = 0, n_full = 0, n_drop = 0;
  logic [31:0] q[$];

  update_fifo #(.WIDTH(32), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < 4000; t++) begin
      bit w, r, f;
      @(negedge clk);
      // check state
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == DEPTH), "full flag");
      check(int'(free) == DEPTH - q.size(), "free count");
      if (q.size() != 0) check(rd_data == q[0], "head word");
      if (full) n_full++;
      // next operation; phases bias towards filling then draining
      f = ($urandom_range(0, 499) == 0);
      w = ($urandom_range(0, 99) < ((t / 500) % 2 ? 30 : 75));
      r = ($urandom_range(0, 99) < ((t / 500) % 2 ? 75 : 30)) && q.size() != 0 && !empty;
      flush   = f;
      wr_en   = w;
      rd_en   = r;
      wr_data = $urandom;
      @(posedge clk);
      #1;
      if (f) q.delete();
      else begin
        bit was_full;
        was_full = (q.size() == DEPTH);
        if (r) void'(q.pop_front());
        if (w) begin
          if (!was_full) q.push_back(wr_data);   // a push on a full FIFO is dropped
          else n_drop++;
        end
      end
      flush = 1'b0; wr_en = 1'b0; rd_en = 1'b0;
    end
    check(n_full > 0, "FIFO reached full");
    check(n_drop > 0, "push on full was exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
