// tb_pcie_regs: register accesses against the register map. Checks the version
// register, address registers (write and read back), that a DATA write gives one
// File pulse with the word, that Start pulses for one clock only with Enable set,
// that dropping Enable takes effect, the STATUS bit layout for random status
// inputs, the FIFO free count and the one-clock read latency.
module tb_pcie_regs;
  import fcm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic req_wr = 1'b0, req_rd = 1'b0;
  logic [7:0] req_addr = '0;
  logic [31:0] req_wdata = '0;
  logic rsp_valid;
  logic [31:0] rsp_rdata;
  logic enable, start, file_wr;
  logic [31:0] addr_a, addr_b, file_data;
  logic busy = 1'b0, active = 1'b0, done = 1'b0, error = 1'b0;
  prog_err_e err_code = ERR_NONE;
  prog_step_e step = STEP_INIT;
  logic [10:0] fifo_free = 11'd1024;

  int checks = 0, failures = 0, n_start = 0, n_file = 0;
  logic [31:0] last_file;

  pcie_regs #(.FW_VERSION(32'h0000_0003), .FIFO_DEPTH(1024)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (start) n_start++;
    if (file_wr) begin n_file++; last_file = file_data; end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    req_wr = 1'b1; req_addr = a; req_wdata = d;
    @(negedge clk);
    req_wr = 1'b0;
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    req_rd = 1'b1; req_addr = a;
    @(negedge clk);
    req_rd = 1'b0;
    check(rsp_valid, "read answered one clock later");
    d = rsp_rdata;
    @(negedge clk);
    check(!rsp_valid, "rsp_valid is one clock long");
  endtask

  logic [31:0] v, a, b;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    rd(REG_VERSION, v);
    check(v == 32'h3, "version");
    check(!enable && !start, "reset: disabled");
    a = $urandom; b = $urandom;
    wr(REG_ADDR_A, a);
    wr(REG_ADDR_B, b);
    check(addr_a == a && addr_b == b, "address outputs");
    rd(REG_ADDR_A, v); check(v == a, "read back A");
    rd(REG_ADDR_B, v); check(v == b, "read back B");
    // Start without Enable is ignored
    wr(REG_CONTROL, 32'h2);
    check(n_start == 0 && !enable, "start ignored when not enabled");
    wr(REG_CONTROL, 32'h1);
    check(enable, "enable set");
    wr(REG_CONTROL, 32'h3);
    repeat (3) @(negedge clk);
    check(n_start == 1, "one start pulse");
    check(enable, "enable kept");
    rd(REG_CONTROL, v); check(v == 32'h1, "control reads enable");
    for (int i = 0; i < 10; i++) begin
      logic [31:0] d;
      d = $urandom;
      wr(REG_DATA, d);
      @(negedge clk);
      check(n_file == i + 1 && last_file == d, "File word");
    end
    for (int i = 0; i < 20; i++) begin
      logic [3:0] s, e;
      logic [4:0] flags;
      flags = 5'($urandom);
      s = 4'($urandom_range(0, 9));
      e = 4'($urandom_range(0, 3));
      busy = flags[0]; done = flags[1]; error = flags[2]; active = flags[3];
      step = prog_step_e'(s); err_code = prog_err_e'(e);
      fifo_free = 11'($urandom_range(0, 1024));
      rd(REG_STATUS, v);
      check(v == {20'd0, e, s, flags[3], flags[2], flags[1], flags[0]}, $sformatf("status %h", v));
      rd(REG_FIFO_FREE, v);
      check(v == 32'(fifo_free), "fifo free");
    end
    wr(REG_VERSION, 32'hFFFF);
    rd(REG_VERSION, v); check(v == 32'h3, "version read-only");
    rd(8'h7C, v); check(v == 32'h0, "unmapped reads zero");
    wr(REG_CONTROL, 32'h0);
    check(!enable, "enable cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
