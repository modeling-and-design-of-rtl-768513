// End-to-end testbench of the node hardware, with every parameter at its default
// (modulo-4 tasks, three link ports). Acting as the node's CPU over the bus it:
//   - enables the three hardware tasks (emulated reconfiguration) and checks they run;
//   - takes a checkpoint of the scan-chain task (task stopped W cycles), migrates it
//     into the memory-mapped task (halt, write state, resume) and disables the source;
//   - takes a checkpoint of the shadow task without stopping it, rolls it back and
//     swaps it;
//   - brings the three links up, injects an isolated bit error (ignored), a burst of
//     errors and a silent line (both take a link down), checks the sticky events,
//     the interrupt and its clearing;
//   - drives the four-state checkpoint FSM through save, refused save, restore and swap;
//   - sends messages out of order to the task message port and checks in-order
//     delivery, freezes it over the bus, reads its checkpoint (counters and local
//     data set) over the bus and rolls it back, and checks tx numbering.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_reconet_node_hw;
  import reconet_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  bus_req_t bus_req = '0;
  logic [31:0] bus_rdata;
  logic bus_rvalid;
  logic [2:0] rx_symbol = '0, rx_error = '0, link_up;
  logic link_irq;
  logic [2:0][31:0] task_out;
  logic [1:0] ckpt_busy;
  logic cf_save = 0, cf_restore = 0;
  logic [1:0] cf_ic = '0, cf_out, cf_ckpt, cf_state;
  logic mp_rx_valid = 0, mp_rx_ready, mp_dlv_valid, mp_dlv_ready = 0;
  logic [7:0] mp_rx_seq = '0, mp_dlv_seq, mp_tx_seq;
  logic [31:0] mp_rx_data = '0, mp_dlv_data, mp_task_tx_data = '0, mp_tx_data;
  logic mp_task_tx_valid = 0, mp_task_tx_ready, mp_tx_valid, mp_tx_ready = 0;
  int checks = 0, failures = 0;

  reconet_node_hw dut (.*);
  always #5 clk = ~clk;

  typedef enum int {M_ENABLE, M_SCAN_SAVE, M_SCAN_RESTORE, M_MIGRATE, M_SHADOW_SAVE,
                    M_SHADOW_RESTORE, M_SHADOW_SWAP, M_MM_HALT, M_LINK_UP, M_BITFLIP,
                    M_DOWN_ERR, M_DOWN_TIMEOUT, M_IRQ_CLEAR, M_CF_SAVE, M_CF_REFUSED,
                    M_CF_RESTORE, M_CF_SWAP, M_MSG_REORDER, M_MSG_FREEZE, M_MSG_CKPT,
                    M_MSG_ROLLBACK, M_MSG_TX, M_COUNT} mech_e;
  int mech[M_COUNT];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic bwr(input slot_e s, input logic [7:0] a, input logic [31:0] d);
    bus_req.wr = 1; bus_req.rd = 0; bus_req.addr = {s, a}; bus_req.wdata = d;
    @(negedge clk);
    bus_req.wr = 0;
  endtask

  // registered read: data is valid one cycle after rd
  task automatic brd(input slot_e s, input logic [7:0] a, output logic [31:0] d);
    bus_req.rd = 1; bus_req.addr = {s, a};
    @(negedge clk);
    bus_req.rd = 0;
    chk(bus_rvalid, "rvalid one cycle after rd");
    d = bus_rdata;
  endtask

  logic [31:0] v, w, st;
  int n;

  function automatic logic [31:0] msg(input int i);
    return 32'hA5A5_0000 + 32'(i * 17);
  endfunction

  task automatic msend(input int i);
    mp_rx_valid = 1; mp_rx_seq = 8'(i); mp_rx_data = msg(i);
    #1 chk(mp_rx_ready, "message accepted");
    @(negedge clk);
    mp_rx_valid = 0;
  endtask

  // take one delivery at the next edge and check it
  task automatic mtake(input int i);
    #1 chk(mp_dlv_valid && mp_dlv_seq == 8'(i) && mp_dlv_data == msg(i),
           $sformatf("in-order delivery of message %0d", i));
    mp_dlv_ready = 1;
    @(negedge clk);
    mp_dlv_ready = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // ---- enable all three tasks
    bwr(SLOT_SCAN, REG_CTRL, 1); bwr(SLOT_SHADOW, REG_CTRL, 1); bwr(SLOT_MM, REG_CTRL, 1);
    v = task_out[0]; @(negedge clk);
    chk(task_out[0] == ((v + 1) & 3), "scan task runs modulo 4");
    mech[M_ENABLE]++;

    // ---- checkpoint the scan task: stopped for W = 2 cycles
    v = task_out[0];
    bwr(SLOT_SCAN, REG_CMD, {29'd0, CMD_SAVE});
    n = 0; while (ckpt_busy[0]) begin n++; @(negedge clk); end
    chk(n == 2, "scan save takes W=2 cycles");
    chk(task_out[0] == ((v + 1) & 3), "scan task state intact after ring read");
    brd(SLOT_SCAN, REG_CKPT, w);
    chk(w == ((v + 1) & 3), "scan checkpoint word");
    brd(SLOT_SCAN, REG_STATUS, st);
    chk(st[31:16] == 2, "scan stopped cycles");
    mech[M_SCAN_SAVE]++;

    // ---- migrate: halt target, load checkpoint, disable source, resume target
    bwr(SLOT_SCAN, REG_CTRL, 0);                 // source stops (module "removed")
    bwr(SLOT_MM, REG_CTRL, 3);                   // target halted
    bwr(SLOT_MM, REG_CKPT, w);
    brd(SLOT_MM, REG_CKPT, v);
    chk(v == w, "target state written");
    mech[M_MM_HALT]++;
    bwr(SLOT_MM, REG_CTRL, 1);
    chk(task_out[2] == w, "migrated task resumes at checkpoint");
    @(negedge clk);
    chk(task_out[2] == ((w + 1) & 3), "migrated task runs on");
    v = task_out[0]; repeat (3) @(negedge clk);
    chk(task_out[0] == v, "source task disabled");
    mech[M_MIGRATE]++;

    // ---- rollback of the scan task to state 3
    bwr(SLOT_SCAN, REG_CKPT, 3);
    bwr(SLOT_SCAN, REG_CMD, {29'd0, CMD_RESTORE});
    n = 0; while (ckpt_busy[0]) begin n++; @(negedge clk); end
    chk(n == 2 && task_out[0] == 3, "scan rollback");
    mech[M_SCAN_RESTORE]++;

    // ---- shadow task: save without stopping, restore, swap
    v = task_out[1];
    bwr(SLOT_SHADOW, REG_CMD, {29'd0, CMD_SAVE});
    n = 0;
    while (ckpt_busy[1]) begin
      w = task_out[1]; @(negedge clk); n++;
      chk(task_out[1] == ((w + 1) & 3), "shadow task never stopped");
    end
    chk(n == 3, "shadow save latency W+1");
    brd(SLOT_SHADOW, REG_CKPT, w);
    chk(w == ((v + 1) & 3), "shadow checkpoint");
    mech[M_SHADOW_SAVE]++;
    bwr(SLOT_SHADOW, REG_CKPT, 2);
    bwr(SLOT_SHADOW, REG_CMD, {29'd0, CMD_RESTORE});
    while (ckpt_busy[1]) @(negedge clk);
    chk(task_out[1] == 2, "shadow rollback");
    mech[M_SHADOW_RESTORE]++;
    @(negedge clk);
    v = task_out[1];
    bwr(SLOT_SHADOW, REG_CMD, {29'd0, CMD_SWAP});
    @(negedge clk);
    chk(task_out[1] == 2, "swap loads the shadow copy");
    mech[M_SHADOW_SWAP]++;

    // ---- links
    for (int k = 0; k < 8; k++) begin rx_symbol = 3'b111; @(negedge clk); end
    chk(link_up == 3'b111, "links up after 8 good symbols");
    chk(!link_irq, "event register set one cycle after the state change");
    @(negedge clk);
    chk(link_irq, "irq on link up");
    mech[M_LINK_UP]++;
    brd(SLOT_LINK, REG_LINK_EVENT, v);
    chk(v == 3'b111, "up events");
    bwr(SLOT_LINK, REG_LINK_EVENT, 3'b111);
    chk(!link_irq, "events cleared");
    mech[M_IRQ_CLEAR]++;
    // isolated bit error on port 0
    rx_error = 3'b001; @(negedge clk); rx_error = 0;
    repeat (3) @(negedge clk);
    chk(link_up == 3'b111 && !link_irq, "isolated bit flip ignored");
    mech[M_BITFLIP]++;
    // error burst on port 1
    rx_error = 3'b010; repeat (4) @(negedge clk); rx_error = 0;
    @(negedge clk);
    chk(link_up == 3'b101 && link_irq, "error burst takes port 1 down");
    mech[M_DOWN_ERR]++;
    // port 2 goes silent
    rx_symbol = 3'b001;
    repeat (63) @(negedge clk);
    chk(link_up[2], "port 2 up before timeout");
    @(negedge clk);
    chk(!link_up[2], "port 2 down after 64 silent cycles");
    brd(SLOT_LINK, REG_LINK_UP, v);
    chk(v == 3'b001, "link state register");
    brd(SLOT_LINK, REG_LINK_EVENT, v);
    chk(v == 3'b110, "down events on ports 1 and 2");
    mech[M_DOWN_TIMEOUT]++;

    // ---- checkpoint FSM example (runs freely since reset)
    @(negedge clk);
    while (cf_state != 2'd2) @(negedge clk);
    cf_save = 1; @(negedge clk); cf_save = 0;
    chk(cf_state == 3 && cf_ckpt == 2, "CFSM save in state 2");
    mech[M_CF_SAVE]++;
    cf_save = 1; @(negedge clk); cf_save = 0;       // state 3: refused
    chk(cf_state == 0 && cf_ckpt == 2, "CFSM save refused in state 3");
    mech[M_CF_REFUSED]++;
    cf_restore = 1; cf_ic = 2; #1;
    chk(cf_out == 2, "CFSM output during restore");
    @(negedge clk); cf_restore = 0;
    chk(cf_state == 3 && cf_ckpt == 2, "CFSM restore");
    mech[M_CF_RESTORE]++;
    @(negedge clk);                                // state 0
    cf_save = 1; cf_restore = 1; cf_ic = 2;
    @(negedge clk); cf_save = 0; cf_restore = 0;
    chk(cf_state == 3 && cf_ckpt == 0, "CFSM swap in state 0");
    mech[M_CF_SWAP]++;

    // ---- message port: out-of-order arrival
    msend(1); msend(2);
    #1 chk(!mp_dlv_valid, "early messages parked");
    brd(SLOT_LINK, REG_MP_SEQ, v);
    chk(v[23:16] == 2 && v[7:0] == 0, "two messages held, waiting for 0");
    msend(0);
    mtake(0); mtake(1); mtake(2);
    mech[M_MSG_REORDER]++;
    // freeze for a checkpoint: arrivals parked, nothing delivered or sent
    bwr(SLOT_LINK, REG_MP_CTRL, 1);
    msend(4); msend(3);
    mp_task_tx_valid = 1; mp_tx_ready = 1; #1;
    chk(!mp_dlv_valid && !mp_tx_valid && !mp_task_tx_ready, "frozen port is silent");
    mp_task_tx_valid = 0;
    mech[M_MSG_FREEZE]++;
    // read the port's checkpoint over the bus
    brd(SLOT_LINK, REG_MP_SEQ, v);
    chk(v[7:0] == 3 && v[23:16] == 2, "checkpoint counters");
    brd(SLOT_LINK, REG_MP_LDS + 8'd6, v); brd(SLOT_LINK, REG_MP_LDS + 8'd7, w);
    chk(v[31] && v[7:0] == 3 && w == msg(3), "local data set entry 3");
    brd(SLOT_LINK, REG_MP_LDS + 8'd8, v); brd(SLOT_LINK, REG_MP_LDS + 8'd9, w);
    chk(v[31] && v[7:0] == 4 && w == msg(4), "local data set entry 4");
    mech[M_MSG_CKPT]++;
    bwr(SLOT_LINK, REG_MP_CTRL, 0);
    mtake(3); mtake(4);
    // roll back to the checkpoint: both messages come again
    bwr(SLOT_LINK, REG_MP_CTRL, 1);
    bwr(SLOT_LINK, REG_MP_SEQ, 32'h0000_0503);      // exp 3, tx 5
    bwr(SLOT_LINK, REG_MP_WDATA, msg(3)); bwr(SLOT_LINK, REG_MP_LDS + 8'd6, 32'h8000_0003);
    bwr(SLOT_LINK, REG_MP_WDATA, msg(4)); bwr(SLOT_LINK, REG_MP_LDS + 8'd8, 32'h8000_0004);
    bwr(SLOT_LINK, REG_MP_CTRL, 0);
    mtake(3); mtake(4);
    mech[M_MSG_ROLLBACK]++;
    // outgoing messages get consecutive identifiers from the loaded value
    mp_task_tx_valid = 1; mp_tx_ready = 1;
    for (int k = 0; k < 3; k++) begin
      mp_task_tx_data = msg(k); #1;
      chk(mp_tx_valid && mp_tx_seq == 8'(5 + k) && mp_tx_data == msg(k), "tx numbering");
      @(negedge clk);
    end
    mp_task_tx_valid = 0;
    mech[M_MSG_TX]++;

    for (int m = 0; m < M_COUNT; m++) begin
      checks++;
      if (mech[m] == 0) begin failures++; $display("FAIL mechanism %0d never happened", m); end
    end
    $display("mechanisms: enable=%0d scan_save=%0d scan_restore=%0d migrate=%0d shadow_save=%0d shadow_restore=%0d swap=%0d mm_halt=%0d link_up=%0d bitflip=%0d down_err=%0d down_timeout=%0d irq_clear=%0d cf_save=%0d cf_refused=%0d cf_restore=%0d cf_swap=%0d msg_reorder=%0d msg_freeze=%0d msg_ckpt=%0d msg_rollback=%0d msg_tx=%0d",
      mech[M_ENABLE], mech[M_SCAN_SAVE], mech[M_SCAN_RESTORE], mech[M_MIGRATE], mech[M_SHADOW_SAVE],
      mech[M_SHADOW_RESTORE], mech[M_SHADOW_SWAP], mech[M_MM_HALT], mech[M_LINK_UP], mech[M_BITFLIP],
      mech[M_DOWN_ERR], mech[M_DOWN_TIMEOUT], mech[M_IRQ_CLEAR], mech[M_CF_SAVE], mech[M_CF_REFUSED],
      mech[M_CF_RESTORE], mech[M_CF_SWAP], mech[M_MSG_REORDER], mech[M_MSG_FREEZE],
      mech[M_MSG_CKPT], mech[M_MSG_ROLLBACK], mech[M_MSG_TX]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
