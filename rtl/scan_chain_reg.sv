// State register with a scan chain (checkpointing by scan chain).
//
// Every one of the W flip-flops gets a scan multiplexer in front of it. In regular
// mode (scan_en = 0) the register loads d from the circuit's logic when en is high.
// In scan mode the flip-flops form one shift register: bit 0 takes scan_in, bit k
// takes bit k-1, and bit W-1 drives scan_out. Feeding scan_out back to scan_in makes
// a ring: after W scan cycles the state is back in place, so the task can resume
// right after a checkpoint has been read; shifting a saved image in instead rolls
// the task back. Scan mode has priority over en. The chain order and the enable are
// this design's choice. Reset clears the register.
module scan_chain_reg #(
  parameter int unsigned W = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         scan_en,
  input  logic [W-1:0] d,
  input  logic         scan_in,
  output logic [W-1:0] q,
  output logic         scan_out
);

  logic [W-1:0] chain_d;

  if (W == 1) begin : g_one
    assign chain_d = scan_in;
  end else begin : g_many
    assign chain_d = {q[W-2:0], scan_in};
  end

  always_ff @(posedge clk) begin
    if (!rst_n)       q <= '0;
    else if (scan_en) q <= chain_d;
    else if (en)      q <= d;
  end

  assign scan_out = q[W-1];

endmodule
