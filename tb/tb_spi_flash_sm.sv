// tb_spi_flash_sm: checks the SPI state machine alone, with a byte-level flash
// responder on its SER-DES handshake (Start/Send -> Done/Receive after a few
// clocks) and a queue standing for the image FIFO.
//
// Every command the state machine issues between two rises of Enable-to-SER-DES is
// logged as "opcode address length" and compared with the sequence the update
// method calls for, written out independently here: READ ID, WRITE ENABLE + ENTER
// 4-BYTE MODE, WRITE ENABLE + SUBSECTOR ERASE of the switch word + status polls,
// WRITE ENABLE + SECTOR ERASE + polls, page programs split at page boundaries +
// polls, one READ of the area, WRITE ENABLE + PAGE PROGRAM of the switch word +
// polls. The responder keeps the programmed bytes, so the test also checks the
// byte order of the image words and the switch word value. A second run corrupts
// one read-back byte and expects Error (verify) with no switch-word program.
// The FIFO is fed slowly so the state machine must pause inside a page program.
module tb_spi_flash_sm;
  import fcm_pkg::*;

  localparam logic [31:0] A     = 32'h0002_0000;
  localparam int          NB    = 600;
  localparam int          LAT   = 6;

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
  logic ser_enable, ser_start, ser_done = 1'b0, ser_busy = 1'b0;
  logic [7:0] ser_send, ser_receive = '0;

  int checks = 0, failures = 0;

  spi_flash_sm dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [7:0] img(input int i);
    return 8'(i * 11 + 3);
  endfunction

  // ---------------------------------------------------------------- FIFO stand-in
  logic [31:0] q[$];
  assign fifo_empty = (q.size() == 0);
  assign fifo_data  = fifo_empty ? 32'h0 : q[0];
  assign fifo_free  = 11'(1024 - q.size());
  int n_popped = 0;
  always @(posedge clk) begin
    if (fifo_flush) q.delete();
    else if (fifo_pop && q.size() != 0) begin void'(q.pop_front()); n_popped++; end
  end

  // ---------------------------------------------------------------- flash responder
  logic [7:0] cur[$];
  string      log[$];
  logic [7:0] mem [int unsigned];
  bit         pending_busy = 0;
  int         corrupt = -1;
  int         n_pauses = 0;

  function automatic logic [31:0] cur_addr();
    return {cur[1], cur[2], cur[3], cur[4]};
  endfunction

  function automatic logic [7:0] answer(input int k);
    if (k == 0) return 8'h00;
    case (cur[0])
      8'h9F: return (k == 1) ? 8'h20 : (k == 2) ? 8'hBA : 8'h19;
      8'h05: begin
        if (pending_busy) begin pending_busy = 0; return 8'h03; end
        return 8'h00;
      end
      8'h03: begin
        logic [31:0] a;
        logic [7:0] v;
        if (k < 5) return 8'h00;
        a = cur_addr() + 32'(k - 5);
        v = mem.exists(a) ? mem[a] : 8'hFF;
        if (int'(a - A) == corrupt) v = ~v;
        return v;
      end
      default: return 8'h00;
    endcase
  endfunction

  logic [7:0] b;
  int gap;
  always begin
    @(posedge clk);
    if (ser_start) begin
      check(ser_enable, "byte started with the flash selected");
      b = ser_send;
      cur.push_back(b);
      ser_busy <= 1'b1;
      repeat (LAT) @(posedge clk);
      ser_receive <= answer(cur.size() - 1);
      ser_done <= 1'b1;
      ser_busy <= 1'b0;
      @(posedge clk);
      ser_done <= 1'b0;
      gap = 0;
    end else if (cur.size() != 0 && ser_enable) begin
      gap++;
      if (gap == 10) n_pauses++;
    end else if (cur.size() != 0 && !ser_enable) begin
      finish_cmd();
    end
  end

  task automatic finish_cmd();
    int len;
    string s;
    len = cur.size() - 1;
    if (cur[0] inside {8'h20, 8'hD8, 8'h02, 8'h03}) begin
      s = $sformatf("%02h %08h %0d", cur[0], cur_addr(), len - 4);
      if (cur[0] == 8'h02) for (int i = 5; i < cur.size(); i++) mem[cur_addr() + 32'(i - 5)] = cur[i];
      if (cur[0] != 8'h03) pending_busy = 1;
    end else begin
      s = $sformatf("%02h %0d", cur[0], len);
    end
    log.push_back(s);
    cur.delete();
  endtask

  // ---------------------------------------------------------------- expected sequence
  string exp[$];
  task automatic build_expected(input bit with_switch);
    int a;
    exp.delete();
    exp.push_back("9f 3");
    exp.push_back("06 0"); exp.push_back("b7 0");
    exp.push_back("06 0"); exp.push_back("20 00000000 0"); exp.push_back("05 1"); exp.push_back("05 1");
    exp.push_back("06 0"); exp.push_back($sformatf("d8 %08h 0", A)); exp.push_back("05 1"); exp.push_back("05 1");
    a = 0;
    while (a < NB) begin
      int n;
      n = (NB - a < 256) ? NB - a : 256;
      exp.push_back("06 0");
      exp.push_back($sformatf("02 %08h %0d", A + 32'(a), n));
      exp.push_back("05 1"); exp.push_back("05 1");
      a += n;
    end
    exp.push_back($sformatf("03 %08h %0d", A, NB));
    if (with_switch) begin
      exp.push_back("06 0"); exp.push_back("02 00000000 4"); exp.push_back("05 1"); exp.push_back("05 1");
    end
  endtask

  task automatic run_update(input bit expect_ok);
    log.delete();
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    // feed the image slowly, one word every 50 clocks, after Start
    for (int w = 0; w < NB / 4; w++) begin
      repeat (50) @(negedge clk);
      q.push_back({img(4*w+3), img(4*w+2), img(4*w+1), img(4*w)});
    end
    while (active) @(negedge clk);
    repeat (20) @(negedge clk);
    build_expected(expect_ok);
    check(log.size() == exp.size(), $sformatf("command count %0d expected %0d", log.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < log.size(); i++)
      check(log[i] == exp[i], $sformatf("command %0d: '%s' expected '%s'", i, log[i], exp[i]));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    enable = 1'b1;
    repeat (5) @(posedge clk);
    check(step == STEP_INIT && !active && busy, "idle after reset");

    run_update(1'b1);
    check(done && !error && step == STEP_DONE, "run 1 done");
    for (int i = 0; i < NB; i++) check(mem[A + 32'(i)] == img(i), $sformatf("image byte %0d", i));
    check({mem[0], mem[1], mem[2], mem[3]} == 32'hAA99_5566, "switch word programmed");
    check(n_popped == NB / 4, "every image word popped once");
    check(n_pauses > 0, "state machine paused on an empty FIFO");

    mem.delete();
    corrupt = 333;
    run_update(1'b0);
    check(error && !done && err_code == ERR_VERIFY && step == STEP_ERROR, "run 2 verify error");
    check(!mem.exists(0), "switch word not programmed after failed verify");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
