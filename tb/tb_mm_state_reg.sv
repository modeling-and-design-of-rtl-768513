// Self-checking testbench of the memory-mapped state register (W = 72, 3 words).
// Checks that every word reads back the packed state (bits past W read zero), that
// a write replaces exactly the selected word, and that the other words keep
// following the functional input in the same cycle.
module tb_mm_state_reg;
  localparam int unsigned W = 72, DW = 32, NW = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 1'b0, cp_we = 1'b0;
  logic [1:0] sel = '0;
  logic [DW-1:0] cp_in = '0, cp_rdata;
  logic [W-1:0] d = '0, q, exp_q;
  logic [NW*DW-1:0] pad;
  int checks = 0, failures = 0;

  mm_state_reg #(.W(W), .DW(DW)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s q=%h", what, q); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    chk(q == '0, "reset");
    for (int r = 0; r < 100; r++) begin
      en = 1; d = {$urandom, $urandom, $urandom};
      @(negedge clk); en = 0;
      chk(q == d, "functional load");
      pad = (NW*DW)'(q);
      for (int k = 0; k < int'(NW); k++) begin
        sel = 2'(k); #1;
        chk(cp_rdata == pad[k*DW +: DW], "read word");
      end
      // write one word while the rest follows d
      sel = 2'($urandom % NW); cp_in = $urandom; cp_we = 1; en = ($urandom % 2) == 1;
      d = {$urandom, $urandom, $urandom};
      pad = en ? (NW*DW)'(d) : (NW*DW)'(q);
      pad[sel*DW +: DW] = cp_in;
      exp_q = W'(pad);
      @(negedge clk); cp_we = 0; en = 0;
      chk(q == exp_q, "write selected word only");
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
