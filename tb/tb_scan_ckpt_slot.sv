// Self-checking testbench of the scan-chain task slot, with a 41-bit task state
// (modulo 2**40+7 counter, two checkpoint words). Checks: the task counts while
// enabled and holds when disabled or halted; SAVE stops the task for exactly W
// cycles, leaves the state unchanged and puts it into the buffer; RESTORE rolls the
// task back to a state written into the buffer, also in W cycles; the counter wraps
// modulo N after a restore near the top.
module tb_scan_ckpt_slot;
  import reconet_pkg::*;
  localparam longint unsigned N = 64'h100_0000_0007;
  localparam int unsigned W = 41;

  logic clk = 1'b0, rst_n = 1'b0;
  bus_req_t bus_req = '0;
  logic [31:0] bus_rdata, task_out;
  logic busy;
  int checks = 0, failures = 0;

  scan_ckpt_slot #(.N(N)) dut (.clk, .rst_n, .sel(1'b1), .bus_req, .bus_rdata, .task_out, .busy);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one bus write, taking effect at the next rising edge; returns at the negedge after
  task automatic bwr(input logic [7:0] a, input logic [31:0] d);
    bus_req.wr = 1; bus_req.addr = {2'b00, a}; bus_req.wdata = d;
    @(negedge clk);
    bus_req.wr = 0;
  endtask


  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    bus_req.addr = {2'b00, a}; #1 d = bus_rdata;
  endtask

  // full state read through the task output is only 32 bits: read both buffer words
  task automatic rd_buf(output logic [63:0] v);
    logic [31:0] lo, hi;
    rd(REG_CKPT, lo); rd(REG_CKPT + 8'd1, hi);
    v = {hi, lo};
  endtask

  logic [31:0] o0, o1, st;
  logic [63:0] v, x;
  int busy_cycles;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    rd(REG_OUT, o0); chk(o0 == 0, "reset state 0");
    bwr(REG_CTRL, 32'h1);                       // enable
    repeat (5) @(negedge clk);
    rd(REG_OUT, o0); @(negedge clk); rd(REG_OUT, o1);
    chk(o1 == o0 + 1, "task counts when enabled");
    for (int r = 0; r < 6; r++) begin
      // ---- SAVE
      rd(REG_OUT, o0);
      bwr(REG_CMD, {29'd0, CMD_SAVE});          // task steps once more at this edge
      busy_cycles = 0;
      while (busy) begin busy_cycles++; @(negedge clk); end
      chk(busy_cycles == W, $sformatf("save stops task W cycles (%0d)", busy_cycles));
      rd(REG_OUT, o1);
      chk(o1 == o0 + 1, "state unchanged by ring read");
      rd(REG_STATUS, st); chk(st[31:16] == 16'(W), "stopped-cycle count");
      rd_buf(v);
      chk(v[31:0] == o0 + 1 && v[63:W] == 0, "buffer holds checkpoint");
      @(negedge clk); rd(REG_OUT, o1); chk(o1 == o0 + 2, "task resumes");
      // ---- RESTORE to a random state
      x = {$urandom, $urandom} % N;
      if (r == 5) x = N - 2;
      bwr(REG_CKPT, x[31:0]); bwr(REG_CKPT + 8'd1, x[63:32]);
      bwr(REG_CMD, {29'd0, CMD_RESTORE});
      busy_cycles = 0;
      while (busy) begin busy_cycles++; @(negedge clk); end
      chk(busy_cycles == W, "restore takes W cycles");
      rd(REG_OUT, o1); chk(o1 == x[31:0], "rolled back");
      @(negedge clk); rd(REG_OUT, o1); chk(o1 == 32'(x + 1), "runs from restored state");
    end
    // full 41-bit wrap check: state went N-2 -> N-1 -> 0
    @(negedge clk); rd(REG_OUT, o1); chk(o1 == 0, "wraps modulo N");
    // ---- disable and halt
    bwr(REG_CTRL, 32'h0); rd(REG_OUT, o0);
    repeat (3) @(negedge clk); rd(REG_OUT, o1); chk(o1 == o0, "disabled task holds");
    bwr(REG_CTRL, 32'h3); rd(REG_OUT, o0);
    repeat (3) @(negedge clk); rd(REG_OUT, o1); chk(o1 == o0, "halted task holds");
    rd(REG_CTRL, st); chk(st == 32'h3, "CTRL reads back");
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
