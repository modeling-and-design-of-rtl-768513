// State register with shadow flip-flops (checkpointing by shadow scan chain).
//
// Each of the W main flip-flops has a shadow flip-flop beside it. The shadows are
// linked into a scan chain (bit 0 takes scan_in, bit W-1 drives scan_out) so that a
// checkpoint can be moved out or in while the main register keeps working.
//   store   : shadow <= main (the state of this cycle); the main register still loads d
//   restore : main <= shadow instead of d
//   both    : main and shadow swap in one clock
//   shift   : shadow chain shifts by one (ignored while store is high)
// Hence a checkpoint is stored, restored or swapped in a single clock cycle and the
// task is never stopped for a store. Multiplexer ordering, the enable and the reset
// value (all zero) are this design's choice.
module shadow_chain_reg #(
  parameter int unsigned W = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  input  logic         store,
  input  logic         restore,
  input  logic         shift,
  input  logic         scan_in,
  output logic [W-1:0] q,
  output logic [W-1:0] shadow,
  output logic         scan_out
);

  logic [W-1:0] chain_d;

  if (W == 1) begin : g_one
    assign chain_d = scan_in;
  end else begin : g_many
    assign chain_d = {shadow[W-2:0], scan_in};
  end

  // main flip-flops: restore mux in front of the functional input
  always_ff @(posedge clk) begin
    if (!rst_n)       q <= '0;
    else if (restore) q <= shadow;
    else if (en)      q <= d;
  end

  // shadow flip-flops: capture main, shift along the chain, or hold
  always_ff @(posedge clk) begin
    if (!rst_n)     shadow <= '0;
    else if (store) shadow <= q;
    else if (shift) shadow <= chain_d;
  end

  assign scan_out = shadow[W-1];

endmodule
