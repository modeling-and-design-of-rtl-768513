// Self-checking testbench of the shadow-register state register (W = 11).
// Checks that store copies the state into the shadows in one cycle while the main
// register keeps loading, that restore and swap take one cycle, and that the
// shadow chain can be rotated out and shifted in without touching the main state.
module tb_shadow_chain_reg;
  localparam int unsigned W = 11;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 1'b0, store = 1'b0, restore = 1'b0, shift = 1'b0, scan_in = 1'b0, scan_out;
  logic [W-1:0] d = '0, q, shadow, q_old, sh_before, got, pat, qrun;
  int checks = 0, failures = 0;

  shadow_chain_reg #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s q=%h sh=%h", what, q, shadow); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    chk(q == '0 && shadow == '0, "reset");
    for (int r = 0; r < 50; r++) begin
      @(negedge clk); en = 1; d = W'($urandom);
      @(negedge clk);
      chk(q == d, "load");
      // store: one cycle, main keeps loading
      q_old = q; d = W'($urandom); store = 1;
      @(negedge clk); store = 0;
      chk(shadow == q_old, "store copies state");
      chk(q == d, "main not stopped by store");
      // rotate shadows out while the main register runs
      sh_before = shadow;
      for (int k = 0; k < int'(W); k++) begin
        shift = 1; scan_in = scan_out; got[W-1-k] = scan_out;
        d = W'($urandom);
        @(negedge clk);
        chk(q == d, "main runs during shift");
      end
      shift = 0;
      chk(got == sh_before && shadow == sh_before, "ring read of shadows");
      // shift a new checkpoint in, then restore
      pat = W'($urandom);
      for (int k = 0; k < int'(W); k++) begin
        shift = 1; scan_in = pat[W-1-k];
        @(negedge clk);
      end
      shift = 0;
      chk(shadow == pat, "shift in");
      restore = 1; d = ~pat;
      @(negedge clk); restore = 0;
      chk(q == pat, "restore in one cycle");
      // swap
      d = W'($urandom);
      @(negedge clk);
      qrun = q; sh_before = shadow;
      store = 1; restore = 1;
      @(negedge clk); store = 0; restore = 0; en = 0;
      chk(q == sh_before && shadow == qrun, "swap in one cycle");
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
