// Self-checking testbench of the scan-chain state register (W = 13).
// Checks functional loading and holding, that a W-cycle ring shift returns the
// register to its value while emitting it MSB first, and that shifting a pattern in
// for W cycles loads it (rollback).
module tb_scan_chain_reg;
  localparam int unsigned W = 13;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 1'b0, scan_en = 1'b0, scan_in = 1'b0, scan_out;
  logic [W-1:0] d = '0, q, snap, got, pat;
  int checks = 0, failures = 0;

  scan_chain_reg #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s q=%h", what, q); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    chk(q == '0, "reset");
    for (int r = 0; r < 50; r++) begin
      // functional load
      @(negedge clk); en = 1; d = W'($urandom);
      @(negedge clk); en = 0;
      chk(q == d, "load");
      d = ~d;
      @(negedge clk);
      chk(q == ~d, "hold when en=0");
      // ring read: en stays high to show scan has priority
      snap = q; en = 1; scan_en = 1;
      for (int k = 0; k < int'(W); k++) begin
        got[W-1-k] = scan_out;
        scan_in = scan_out;
        @(negedge clk);
      end
      scan_en = 0; en = 0;
      chk(got == snap, "ring read emits state");
      chk(q == snap, "ring returns state");
      // rollback: shift a pattern in
      pat = W'($urandom); scan_en = 1;
      for (int k = 0; k < int'(W); k++) begin
        scan_in = pat[W-1-k];
        @(negedge clk);
      end
      scan_en = 0;
      chk(q == pat, "shift in restores");
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
