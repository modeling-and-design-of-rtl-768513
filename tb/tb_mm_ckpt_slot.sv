// Self-checking testbench of the memory-mapped task slot, with a 41-bit task state
// (modulo 2**40+7 counter, two state words). Checks: with HALT set the task holds
// and its state words read back directly; writing the words while halted rolls the
// task back; clearing HALT resumes from there; the stopped-cycle counter counts the
// halted cycles; the counter wraps modulo N.
module tb_mm_ckpt_slot;
  import reconet_pkg::*;
  localparam longint unsigned N = 64'h100_0000_0007;
  localparam int unsigned W = 41;

  logic clk = 1'b0, rst_n = 1'b0;
  bus_req_t bus_req = '0;
  logic [31:0] bus_rdata, task_out;
  int checks = 0, failures = 0;

  mm_ckpt_slot #(.N(N)) dut (.clk, .rst_n, .sel(1'b1), .bus_req, .bus_rdata, .task_out);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one bus write, taking effect at the next rising edge; returns at the negedge after
  task automatic bwr(input logic [7:0] a, input logic [31:0] d);
    bus_req.wr = 1; bus_req.addr = {2'b10, a}; bus_req.wdata = d;
    @(negedge clk);
    bus_req.wr = 0;
  endtask


  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    bus_req.addr = {2'b10, a}; #1 d = bus_rdata;
  endtask

  // full state read through the task output is only 32 bits: read both buffer words
  task automatic rd_buf(output logic [63:0] v);
    logic [31:0] lo, hi;
    rd(REG_CKPT, lo); rd(REG_CKPT + 8'd1, hi);
    v = {hi, lo};
  endtask

  logic [31:0] o0, o1, st;
  logic [63:0] v, x;
  int halted;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    bwr(REG_CTRL, 32'h1);
    repeat (7) @(negedge clk);
    for (int r = 0; r < 8; r++) begin
      rd(REG_OUT, o0);
      bwr(REG_CTRL, 32'h3);                     // halt; task steps once at this edge
      halted = 0;
      rd_buf(v);
      chk(v[31:0] == o0 + 1 && v[63:W] == 0, "state words read directly");
      repeat (4) begin @(negedge clk); halted++; end
      rd_buf(v);
      chk(v[31:0] == o0 + 1, "halted task holds");
      x = {$urandom, $urandom} % N;
      if (r == 7) x = N - 1;
      bwr(REG_CKPT, x[31:0]); halted++;
      bwr(REG_CKPT + 8'd1, x[63:32]); halted++;
      rd_buf(v);
      chk(v == x, "state words written directly");
      rd(REG_STATUS, st);
      chk(st[31:16] == 16'(halted), $sformatf("stopped cycles %0d", st[31:16]));
      bwr(REG_CTRL, 32'h1);                     // resume
      rd(REG_OUT, o1); chk(o1 == x[31:0], "resumes from written state");
      @(negedge clk); rd(REG_OUT, o1);
      chk(o1 == ((r == 7) ? 32'd0 : 32'(x + 1)), "runs on (wraps at N)");
      repeat (3) @(negedge clk);
    end
    // a word write while running overrides that word only in that cycle
    rd(REG_OUT, o0);
    bwr(REG_CKPT, 32'd100);
    rd(REG_OUT, o1); chk(o1 == 32'd100, "write while running");
    @(negedge clk); rd(REG_OUT, o1); chk(o1 == 32'd101, "then counts on");
    bwr(REG_CTRL, 32'h0); rd(REG_OUT, o0);
    repeat (3) @(negedge clk); rd(REG_OUT, o1); chk(o1 == o0, "disabled task holds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
