// Self-checking testbench of the task message port (8-bit identifiers, window 8).
// A producer sends 400 messages with consecutive identifiers, shuffled inside
// blocks of 8 and sprinkled with stale duplicates; the task side accepts at random.
// Checks that the task sees every message exactly once, in identifier order, with
// its data; that a message too far ahead is held off; that freeze stops delivery and
// transmission while arrivals are still parked; that the tx side numbers messages
// consecutively; and that a checkpoint read from the local data set and loaded back
// replays the same messages (rollback).
module tb_task_msg_port;
  localparam int unsigned SEQW = 8, DW = 32, DEPTH = 8, IW = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rx_valid = 0, rx_ready, dlv_valid, dlv_ready = 0;
  logic [SEQW-1:0] rx_seq = '0, dlv_seq, tx_seq, exp_seq;
  logic [DW-1:0] rx_data = '0, dlv_data, tx_data;
  logic task_tx_valid = 0, task_tx_ready, tx_valid, tx_ready = 0;
  logic [DW-1:0] task_tx_data = '0;
  logic freeze = 0;
  logic [IW:0] held;
  logic [IW-1:0] lds_idx = '0, lds_widx = '0;
  logic lds_valid, lds_we = 0, lds_wvalid = 0, load_seq = 0;
  logic [SEQW-1:0] lds_seq, lds_wseq = '0, load_exp_seq = '0, load_tx_seq = '0;
  logic [DW-1:0] lds_data, lds_wdata = '0;
  int checks = 0, failures = 0;
  int n_parked = 0, n_stale = 0, n_held_off = 0, n_frozen = 0, n_rollback = 0;

  task_msg_port #(.SEQW(SEQW), .DW(DW), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [DW-1:0] payload(input int i);
    return 32'(i) * 32'h9E37_79B9 + 32'h1234;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---- consumer: checks order and content at every delivery
  int next_expected = 0;
  bit consume_en = 1;
  // decided at the falling edge: the transfer happens at the next rising edge
  always @(negedge clk) begin
    dlv_ready = consume_en && (($urandom % 3) != 0);
    #2;
    if (rst_n && dlv_valid && dlv_ready) begin
      chk(dlv_seq == SEQW'(next_expected) && dlv_data == payload(next_expected),
          $sformatf("in-order delivery of %0d (got %0d)", next_expected, dlv_seq));
      next_expected++;
    end
  end

  task automatic send(input int i);
    rx_valid = 1; rx_seq = SEQW'(i); rx_data = payload(i);
    #1;
    if (!rx_ready) n_held_off++;
    while (!rx_ready) begin @(negedge clk); #1; end
    if (SEQW'(i) != exp_seq && !((SEQW'(i) - exp_seq) >> (SEQW-1))) n_parked++;
    @(negedge clk);
    rx_valid = 0;
  endtask

  int order[DEPTH];
  int sw_j, sw_t;
  int total = 400;
  logic [SEQW-1:0] ck_exp;
  logic [DEPTH-1:0] ck_v;
  logic [DEPTH-1:0][SEQW-1:0] ck_seq;
  logic [DEPTH-1:0][DW-1:0] ck_data;
  int ck_next;
  int n_before;
  logic [SEQW-1:0] s0;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // in-order window test: a message DEPTH ahead is held off
    rx_valid = 1; rx_seq = SEQW'(DEPTH); #1;
    chk(!rx_ready, "message DEPTH ahead held off");
    n_held_off++;
    rx_valid = 0;
    for (int b = 0; b < total / int'(DEPTH); b++) begin
      for (int k = 0; k < int'(DEPTH); k++) order[k] = b * int'(DEPTH) + k;
      for (int k = int'(DEPTH) - 1; k > 0; k--) begin
        sw_j = $urandom % (k + 1); sw_t = order[k]; order[k] = order[sw_j]; order[sw_j] = sw_t;
      end
      for (int k = 0; k < int'(DEPTH); k++) begin
        send(order[k]);
        if (b > 2 && ($urandom % 6) == 0) begin send(b * int'(DEPTH) - 9); n_stale++; end
      end
      // ---- freeze in the middle of the stream
      if (b == 20) begin

        repeat (4) @(negedge clk);
        freeze = 1; task_tx_valid = 1; tx_ready = 1;
        @(negedge clk);
        n_before = next_expected;
        repeat (10) begin
          @(negedge clk); #1;
          chk(!dlv_valid && !tx_valid && !task_tx_ready, "frozen: nothing delivered or sent");
        end
        chk(next_expected == n_before, "no delivery while frozen");
        n_frozen++;
        task_tx_valid = 0; tx_ready = 0;
        freeze = 0;
      end
      // ---- checkpoint and rollback
      if (b == 30) begin
        consume_en = 0; freeze = 1;
        repeat (3) @(negedge clk);
        ck_exp = exp_seq; ck_next = next_expected;
        for (int k = 0; k < int'(DEPTH); k++) begin
          lds_idx = IW'(k); #1;
          ck_v[k] = lds_valid; ck_seq[k] = lds_seq; ck_data[k] = lds_data;
        end
        chk(int'(held) == $countones(ck_v), "held count matches the local data set");
        freeze = 0; consume_en = 1;
        repeat (30) @(negedge clk);          // consume what was parked
        // roll back: reload counters and the local data set
        consume_en = 0;
        @(negedge clk);
        load_seq = 1; load_exp_seq = ck_exp; load_tx_seq = 8'd77;
        @(negedge clk); load_seq = 0;
        for (int k = 0; k < int'(DEPTH); k++) begin
          lds_we = 1; lds_wvalid = ck_v[k]; lds_wseq = ck_seq[k]; lds_wdata = ck_data[k];
          lds_widx = IW'(k);
          @(negedge clk);
        end
        lds_we = 0;
        chk(tx_seq == 8'd77, "tx counter reloaded");
        next_expected = ck_next;             // the task replays from the checkpoint
        consume_en = 1;
        n_rollback++;
      end
    end
    repeat (200) @(negedge clk);
    chk(next_expected == total, $sformatf("all messages delivered (%0d)", next_expected));
    chk(held == 0, "local data set empty at the end");
    // ---- tx numbering
    begin
      s0 = tx_seq; task_tx_valid = 1;
      for (int k = 0; k < 20; k++) begin
        tx_ready = ($urandom % 2) == 1; task_tx_data = payload(k);
        #1;
        if (tx_valid && tx_ready) begin
          chk(tx_seq == s0 && tx_data == payload(k), "consecutive tx identifiers");
          s0++;
        end
        @(negedge clk);
      end
      task_tx_valid = 0;
    end
    if (n_parked == 0 || n_stale == 0 || n_held_off == 0 || n_frozen == 0 || n_rollback == 0) begin
      failures++;
      $display("FAIL coverage parked=%0d stale=%0d held_off=%0d frozen=%0d rollback=%0d",
               n_parked, n_stale, n_held_off, n_frozen, n_rollback);
    end
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
