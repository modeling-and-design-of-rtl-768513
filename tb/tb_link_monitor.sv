// Self-checking testbench of the link-state monitor (TIMEOUT 16, UP_COUNT 4,
// ERR_LIMIT 3). Directed part: link comes up after exactly 4 good symbols, an
// isolated bit error is ignored, 3 bad symbols in a row take it down, and 16 silent
// cycles take it down. Random part: phases of healthy, dead and noisy line compared
// cycle by cycle with a reference model of the rule.
module tb_link_monitor;
  localparam int unsigned T = 16, U = 4, E = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rx_symbol = 1'b0, rx_error = 1'b0, link_up, went_down, went_up;
  int checks = 0, failures = 0;
  int n_up = 0, n_down_err = 0, n_down_to = 0, n_flip_ignored = 0;

  link_monitor #(.TIMEOUT(T), .UP_COUNT(U), .ERR_LIMIT(E)) dut (.*);
  always #5 clk = ~clk;

  // reference model state
  bit m_up; int m_idle, m_gr, m_er; bit m_wd, m_wu;

  task automatic model_step(input bit sym, input bit err);
    bit g, b;
    g = sym && !err; b = sym && err;
    m_wd = 0; m_wu = 0;
    if (m_up) begin
      if (g) begin m_idle = 0; m_er = 0; end
      else begin
        m_idle++;
        if (b) m_er++;
        if (m_idle >= int'(T) || m_er >= int'(E)) begin
          if (m_er >= int'(E)) n_down_err++; else n_down_to++;
          m_up = 0; m_idle = 0; m_er = 0; m_wd = 1;
        end else if (b && m_er == 1) n_flip_ignored++;
      end
    end else begin
      if (g) begin
        m_gr++;
        if (m_gr >= int'(U)) begin m_up = 1; m_gr = 0; m_wu = 1; n_up++; end
      end else if (b) m_gr = 0;
    end
  endtask

  task automatic cyc(input bit sym, input bit err);
    rx_symbol = sym; rx_error = err;
    @(posedge clk);
    model_step(sym, err);
    #1;
    checks++;
    if (link_up !== m_up || went_down !== m_wd || went_up !== m_wu) begin
      failures++;
      $display("FAIL t=%0t up=%b/%b wd=%b/%b wu=%b/%b", $time, link_up, m_up,
               went_down, m_wd, went_up, m_wu);
    end
  endtask

  task automatic expect_up(input bit v, input string what);
    checks++;
    if (link_up !== v) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    m_up = 0; m_idle = 0; m_gr = 0; m_er = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1 expect_up(0, "down after reset");
    repeat (3) cyc(1, 0);
    expect_up(0, "not up after 3 good");
    cyc(1, 0);
    expect_up(1, "up after 4 good");
    for (int k = 0; k < 20; k++) begin cyc(1, 1); cyc(1, 0); cyc(0, 0); end
    expect_up(1, "isolated bit errors ignored");
    cyc(1, 1); cyc(1, 1);
    expect_up(1, "two bad in a row tolerated");
    cyc(1, 1);
    expect_up(0, "down after 3 bad in a row");
    repeat (4) cyc(1, 0);
    expect_up(1, "up again");
    repeat (T - 1) cyc(0, 0);
    expect_up(1, "still up after 15 silent cycles");
    cyc(0, 0);
    expect_up(0, "down after 16 silent cycles");
    // random phases
    for (int ph = 0; ph < 60; ph++) begin
      int kind = $urandom % 3;
      int len  = 20 + $urandom % 60;
      for (int k = 0; k < len; k++) begin
        case (kind)
          0: cyc(($urandom % 2) == 0, ($urandom % 20) == 0);  // healthy
          1: cyc(($urandom % 40) == 0, 1'b0);                  // dead
          default: cyc(($urandom % 2) == 0, ($urandom % 3) != 0); // noisy
        endcase
      end
    end
    if (n_up == 0 || n_down_err == 0 || n_down_to == 0 || n_flip_ignored == 0) begin
      failures++;
      $display("FAIL coverage up=%0d down_err=%0d down_to=%0d flips=%0d",
               n_up, n_down_err, n_down_to, n_flip_ignored);
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
