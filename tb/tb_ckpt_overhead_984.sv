// Checkpoint overhead of the three state-access schemes for a task with 984 state
// flip-flops (the size of a DES core), 31 checkpoint words.
// For each slot it measures, in clock cycles, how long the task is interrupted by
// taking a checkpoint (C) and how long until the CPU holds the whole checkpoint
// (L, with one bus read per cycle), checks that a random 984-bit image survives a
// restore followed by a save bit for bit, and checks that the interruption ranks
// shadow < memory-mapped < scan, the ranking measured on hardware for these schemes.
module tb_ckpt_overhead_984;
  import reconet_pkg::*;
  localparam int unsigned W  = 984;
  localparam int unsigned NW = (W + 31) / 32;
  localparam longint unsigned N = 64'h4000_0000_0000_0000;

  logic clk = 1'b0, rst_n = 1'b0;
  bus_req_t req[3];
  logic [31:0] rdata[3], tout[3];
  logic busy_s, busy_h;
  int checks = 0, failures = 0;

  scan_ckpt_slot   #(.N(N), .W(W)) u_s (.clk, .rst_n, .sel(1'b1), .bus_req(req[0]),
                                        .bus_rdata(rdata[0]), .task_out(tout[0]), .busy(busy_s));
  shadow_ckpt_slot #(.N(N), .W(W)) u_h (.clk, .rst_n, .sel(1'b1), .bus_req(req[1]),
                                        .bus_rdata(rdata[1]), .task_out(tout[1]), .busy(busy_h));
  mm_ckpt_slot     #(.N(N), .W(W)) u_m (.clk, .rst_n, .sel(1'b1), .bus_req(req[2]),
                                        .bus_rdata(rdata[2]), .task_out(tout[2]));
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic bwr(input int s, input logic [7:0] a, input logic [31:0] d);
    req[s].wr = 1; req[s].addr = {2'b00, a}; req[s].wdata = d;
    @(negedge clk);
    req[s].wr = 0;
  endtask

  // one read per cycle
  task automatic brd(input int s, input logic [7:0] a, output logic [31:0] d);
    req[s].addr = {2'b00, a}; #1 d = rdata[s];
    @(negedge clk);
  endtask

  logic [NW*32-1:0] img, got;
  logic [31:0] o0, o1, st;
  int c_cyc[3], l_cyc[3];
  int t0;

  function automatic logic [NW*32-1:0] mask_w(input logic [NW*32-1:0] v);
    return v & {{(NW*32-W){1'b0}}, {W{1'b1}}};
  endfunction

  task automatic read_image(input int s, output logic [NW*32-1:0] v);
    logic [31:0] x;
    for (int k = 0; k < int'(NW); k++) begin brd(s, REG_CKPT + 8'(k), x); v[k*32 +: 32] = x; end
  endtask

  task automatic write_image(input int s, input logic [NW*32-1:0] v);
    for (int k = 0; k < int'(NW); k++) bwr(s, REG_CKPT + 8'(k), v[k*32 +: 32]);
  endtask

  initial begin
    for (int s = 0; s < 3; s++) req[s] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // ---- round trip of random images, tasks disabled
    for (int r = 0; r < 3; r++) begin
      for (int k = 0; k < int'(NW); k++) img[k*32 +: 32] = $urandom;
      write_image(0, img); bwr(0, REG_CMD, 32'(CMD_RESTORE)); while (busy_s) @(negedge clk);
      for (int k = 0; k < int'(NW); k++) bwr(0, REG_CKPT + 8'(k), 32'd0);
      bwr(0, REG_CMD, 32'(CMD_SAVE)); while (busy_s) @(negedge clk);
      read_image(0, got); chk(got == mask_w(img), "scan: 984-bit image round trip");
      write_image(1, img); bwr(1, REG_CMD, 32'(CMD_RESTORE)); while (busy_h) @(negedge clk);
      for (int k = 0; k < int'(NW); k++) bwr(1, REG_CKPT + 8'(k), 32'd0);
      bwr(1, REG_CMD, 32'(CMD_SAVE)); while (busy_h) @(negedge clk);
      read_image(1, got); chk(got == mask_w(img), "shadow: 984-bit image round trip");
      write_image(2, img);
      read_image(2, got); chk(got == mask_w(img), "memory-mapped: 984-bit image round trip");
    end

    // ---- overhead with running tasks (state small so the counter runs normally)
    for (int s = 0; s < 3; s++) begin
      write_image(s, '0);
      if (s < 2) begin
        bwr(s, REG_CMD, 32'(CMD_RESTORE));
        while ((s == 0) ? busy_s : busy_h) @(negedge clk);
      end
      bwr(s, REG_CTRL, 32'h1);
    end
    repeat (5) @(negedge clk);

    // scan
    t0 = 0;
    bwr(0, REG_CMD, 32'(CMD_SAVE)); t0++;
    while (busy_s) begin @(negedge clk); t0++; end
    brd(0, REG_STATUS, st); c_cyc[0] = int'(st[31:16]);
    read_image(0, got); l_cyc[0] = t0 + 1 + int'(NW);
    chk(c_cyc[0] == int'(W), "scan interrupts the task W cycles");

    // shadow: check the task keeps counting through the whole save
    brd(1, REG_OUT, o0);
    t0 = 0;
    bwr(1, REG_CMD, 32'(CMD_SAVE)); t0++;
    while (busy_h) begin @(negedge clk); t0++; end
    brd(1, REG_OUT, o1);
    chk(o1 == o0 + 32'(t0) + 1, "shadow task never interrupted");
    brd(1, REG_STATUS, st); c_cyc[1] = int'(st[31:16]);
    read_image(1, got); l_cyc[1] = t0 + 1 + int'(NW);

    // memory mapped: halt, read all words, resume
    t0 = 0;
    bwr(2, REG_CTRL, 32'h3); t0++;
    read_image(2, got); t0 += int'(NW);
    brd(2, REG_STATUS, st); t0++;
    c_cyc[2] = int'(st[31:16]) + 1;
    bwr(2, REG_CTRL, 32'h1);
    l_cyc[2] = t0;
    chk(c_cyc[2] >= int'(NW), "memory-mapped interrupts at least one cycle per word");

    chk(c_cyc[1] < c_cyc[2] && c_cyc[2] < c_cyc[0], "interruption ranks shadow < memory-mapped < scan");
    $display("scheme          C(cycles)  L(cycles)");
    $display("scan chain      %9d  %9d", c_cyc[0], l_cyc[0]);
    $display("shadow chain    %9d  %9d", c_cyc[1], l_cyc[1]);
    $display("memory mapped   %9d  %9d", c_cyc[2], l_cyc[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
