// Self-checking testbench of the shadow-register task slot, with a 41-bit task state
// (modulo 2**40+7 counter, two checkpoint words). Checks: the task is never stopped
// by checkpointing (it advances every cycle through SAVE); SAVE captures the state
// of the cycle after the command and has it in the buffer after W+1 cycles;
// RESTORE shifts a buffered state in and loads it in one cycle after W+1 cycles;
// SWAP exchanges the running state with the shadow copy in one cycle.
module tb_shadow_ckpt_slot;
  import reconet_pkg::*;
  localparam longint unsigned N = 64'h100_0000_0007;
  localparam int unsigned W = 41;

  logic clk = 1'b0, rst_n = 1'b0;
  bus_req_t bus_req = '0;
  logic [31:0] bus_rdata, task_out;
  logic busy;
  int checks = 0, failures = 0;

  shadow_ckpt_slot #(.N(N)) dut (.clk, .rst_n, .sel(1'b1), .bus_req, .bus_rdata, .task_out, .busy);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one bus write, taking effect at the next rising edge; returns at the negedge after
  task automatic bwr(input logic [7:0] a, input logic [31:0] d);
    bus_req.wr = 1; bus_req.addr = {2'b01, a}; bus_req.wdata = d;
    @(negedge clk);
    bus_req.wr = 0;
  endtask


  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    bus_req.addr = {2'b01, a}; #1 d = bus_rdata;
  endtask

  // full state read through the task output is only 32 bits: read both buffer words
  task automatic rd_buf(output logic [63:0] v);
    logic [31:0] lo, hi;
    rd(REG_CKPT, lo); rd(REG_CKPT + 8'd1, hi);
    v = {hi, lo};
  endtask

  logic [31:0] o0, o1, st, prev;
  logic [63:0] v, x;
  int busy_cycles;
  bit never_stopped;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    bwr(REG_CTRL, 32'h1);
    repeat (5) @(negedge clk);
    for (int r = 0; r < 6; r++) begin
      // ---- SAVE: task keeps running
      rd(REG_OUT, o0);
      bwr(REG_CMD, {29'd0, CMD_SAVE});
      rd(REG_OUT, prev);
      chk(prev == o0 + 1, "task steps at command edge");
      busy_cycles = 0; never_stopped = 1;
      while (busy) begin
        busy_cycles++; @(negedge clk);
        rd(REG_OUT, o1);
        if (o1 != prev + 1) never_stopped = 0;
        prev = o1;
      end
      chk(never_stopped, "task not stopped during save");
      chk(busy_cycles == W + 1, $sformatf("save latency W+1 (%0d)", busy_cycles));
      rd_buf(v);
      chk(v[31:0] == o0 + 1 && v[63:W] == 0, "buffer holds state of store cycle");
      rd(REG_STATUS, st); chk(st[31:16] == 0, "zero stopped cycles");
      // ---- RESTORE
      x = {$urandom, $urandom} % N;
      if (r == 5) x = N - 1;
      bwr(REG_CKPT, x[31:0]); bwr(REG_CKPT + 8'd1, x[63:32]);
      bwr(REG_CMD, {29'd0, CMD_RESTORE});
      busy_cycles = 0;
      while (busy) begin busy_cycles++; @(negedge clk); end
      chk(busy_cycles == W + 1, "restore latency W+1");
      rd(REG_OUT, o1); chk(o1 == x[31:0], "rolled back in one cycle");
      @(negedge clk); rd(REG_OUT, o1);
      chk(o1 == ((r == 5) ? 32'd0 : 32'(x + 1)), "runs from restored state (wraps at N)");
      // ---- SWAP: shadow holds x, task now at some y
      repeat (3) @(negedge clk);
      rd(REG_OUT, o0);
      bwr(REG_CMD, {29'd0, CMD_SWAP});          // y = o0+1 after this edge
      @(negedge clk);                           // swap edge
      rd(REG_OUT, o1);
      chk(o1 == x[31:0], "swap loads shadow");
      // the shadow now holds the running state of the swap cycle, o0+1: swap back
      bwr(REG_CMD, {29'd0, CMD_SWAP});
      @(negedge clk);
      rd(REG_OUT, o1);
      chk(o1 == o0 + 1, "second swap returns the swapped-out state");
    end
    // swap returns the previous running state
    rd(REG_OUT, o0);
    bwr(REG_CMD, {29'd0, CMD_SAVE});            // shadow <= o0+1 at next edge
    while (busy) @(negedge clk);
    repeat (4) @(negedge clk);
    bwr(REG_CMD, {29'd0, CMD_SWAP});
    @(negedge clk);
    rd(REG_OUT, o1); chk(o1 == o0 + 1, "swap brings back stored state");
    bwr(REG_CTRL, 32'h3); rd(REG_OUT, o0);
    repeat (3) @(negedge clk); rd(REG_OUT, o1); chk(o1 == o0, "halted task holds");
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
