// Self-checking testbench of the modulo-4 counter checkpoint FSM (Sc = {0, 2}).
// First walks the labelled transitions of the example state diagram, each given as
// (i_c, save, restore) / (out, ckpt) and the next (state, ckpt) pair, then runs a
// random sequence against an independent model.
module tb_cfsm_mod4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic i_save = 1'b0, i_restore = 1'b0;
  logic [1:0] i_c = '0, out, ckpt, state;
  int checks = 0, failures = 0;

  cfsm_mod4 dut (.*);
  always #5 clk = ~clk;

  // called just after a clock edge: apply one input, check outputs before and state after the edge
  task automatic step(input logic [1:0] ic, input bit sv, input bit rs,
                      input logic [1:0] eo, input logic [1:0] ec,
                      input logic [1:0] ns, input logic [1:0] nc);
    i_c = ic; i_save = sv; i_restore = rs;
    #1;
    checks++;
    if (out !== eo || ckpt !== ec) begin
      failures++;
      $display("FAIL out/ckpt at (%0d,%0d) in=(%0d,%0d,%0d): got %0d/%0d exp %0d/%0d",
               state, ckpt, ic, sv, rs, out, ckpt, eo, ec);
    end
    @(posedge clk); #1;
    checks++;
    if (state !== ns || ckpt !== nc) begin
      failures++;
      $display("FAIL next: got (%0d,%0d) exp (%0d,%0d)", state, ckpt, ns, nc);
    end
    i_save = 0; i_restore = 0;
  endtask

  logic [1:0] m_s, m_c, sel;
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    checks++;
    if (state !== 2'd0 || ckpt !== 2'd0) begin failures++; $display("FAIL reset"); end
    // copy with checkpoint 0
    step(0, 0, 0, 0, 0, 1, 0);   // (0,0) -> (1,0)
    step(0, 0, 0, 1, 0, 2, 0);   // (1,0) -> (2,0)
    step(0, 1, 0, 2, 0, 3, 2);   // save in (2,0): (-,1,0)/(2,0) -> (3,2)
    step(0, 0, 0, 3, 2, 0, 2);   // (3,2) -> (0,2)
    step(0, 1, 0, 0, 2, 1, 0);   // save in (0,2): (-,1,0)/(0,2) -> (1,0)
    step(0, 1, 0, 1, 0, 2, 0);   // save refused in state 1
    step(2, 0, 1, 2, 0, 3, 0);   // restore 2: (2,0,1)/(2,0) -> (3,0)
    step(0, 0, 1, 0, 0, 1, 0);   // restore 0: (0,0,1)/(0,0) -> (1,0)
    step(0, 0, 0, 1, 0, 2, 0);
    step(0, 1, 0, 2, 0, 3, 2);   // -> (3,2)
    step(0, 0, 0, 3, 2, 0, 2);
    step(0, 0, 0, 0, 2, 1, 2);
    step(0, 0, 0, 1, 2, 2, 2);   // (2,2)
    step(0, 1, 0, 2, 2, 3, 2);   // save in (2,2) equals a normal step
    step(2, 0, 1, 2, 2, 3, 2);   // restore 2: (2,0,1)/(2,2)
    step(0, 0, 1, 0, 2, 1, 2);   // restore 0: (0,0,1)/(0,2)
    step(0, 0, 0, 1, 2, 2, 2);
    step(0, 1, 1, 0, 2, 1, 2);   // swap in state 2 with i_c = 0: (delta(0), 2)
    // random run against the model
    m_s = state; m_c = ckpt;
    for (int k = 0; k < 2000; k++) begin
      i_save = $urandom % 3 == 0; i_restore = $urandom % 4 == 0; i_c = 2'($urandom);
      sel = (i_restore && (!i_save || m_s[0] == 1'b0)) ? i_c : m_s;
      #1;
      checks++;
      if (out !== sel || ckpt !== m_c) begin failures++; $display("FAIL random out"); end
      @(posedge clk); #1;
      if (i_save && m_s[0] == 1'b0) m_c = m_s;
      m_s = sel + 2'd1;
      checks++;
      if (state !== m_s || ckpt !== m_c) begin failures++; $display("FAIL random next"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
