// Self-checking testbench of the generic checkpoint-FSM wrapper.
// Wraps an arbitrary 8-state machine, delta(s) = (3*s + 1) mod 8, with the
// checkpoint set {0, 2, 5}, drives random save/restore/i_c and compares state,
// checkpoint and the state handed to delta with a reference model of the six
// transition rules, every cycle.
module tb_cfsm;
  localparam int unsigned SW = 3;
  localparam logic [7:0] SC = 8'b0010_0101;

  logic clk = 1'b0, rst_n = 1'b0;
  logic i_save = 1'b0, i_restore = 1'b0;
  logic [SW-1:0] i_c = '0, sel_state, next_state, state, ckpt;
  int checks = 0, failures = 0;
  int n_save = 0, n_restore = 0, n_swap = 0, n_refused = 0;

  cfsm #(.SW(SW), .SC_MASK(SC), .S0(3'd1)) dut (.*);

  assign next_state = SW'((3 * int'(sel_state) + 1) % 8);

  always #5 clk = ~clk;

  function automatic logic [SW-1:0] delta(input logic [SW-1:0] s);
    return SW'((3 * int'(s) + 1) % 8);
  endfunction

  logic [SW-1:0] m_s, m_c, exp_sel;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: state=%0d ckpt=%0d exp %0d/%0d", what, state, ckpt, m_s, m_c);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    m_s = 3'd1; m_c = 3'd1;
    @(negedge clk);
    check(state == 3'd1 && ckpt == 3'd1, "reset (s0,s0)");
    for (int k = 0; k < 3000; k++) begin
      i_save    = ($urandom % 4) == 0;
      i_restore = ($urandom % 5) == 0;
      i_c       = SW'($urandom);
      #1;
      // reference
      if (!i_save && !i_restore)      begin exp_sel = m_s; end
      else if (i_save && !i_restore)  begin exp_sel = m_s; end
      else if (!i_save && i_restore)  begin exp_sel = i_c; n_restore++; end
      else if (SC[m_s])               begin exp_sel = i_c; n_swap++; end
      else                            begin exp_sel = m_s; n_refused++; end
      check(sel_state == exp_sel, "sel_state");
      @(posedge clk);
      if (i_save && SC[m_s]) begin m_c = m_s; if (!i_restore) n_save++; end
      m_s = delta(exp_sel);
      @(negedge clk);
      check(state == m_s && ckpt == m_c, "transition");
    end
    if (n_save == 0 || n_restore == 0 || n_swap == 0 || n_refused == 0) begin
      failures++;
      $display("FAIL coverage save=%0d restore=%0d swap=%0d refused=%0d",
               n_save, n_restore, n_swap, n_refused);
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
