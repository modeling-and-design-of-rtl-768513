// Memory-mapped state register (checkpointing by direct CPU access).
//
// The W flip-flops are grouped into NWORDS words of DW bits, packed LSB first:
// word k holds state bits k*DW .. k*DW+DW-1, bits past W read as zero. A checkpoint
// read multiplexer puts the word chosen by sel on cp_rdata (combinational), so the
// CPU reads the state like memory. A checkpoint restore multiplexer in front of each
// flip-flop loads cp_in into the selected word when cp_we is high; this overrides
// the functional input d for that word in that cycle. Other words load d when en is
// high. The word packing (a bit vector read as an unsigned integer by software) and
// the reset value (zero) are this design's choice.
module mm_state_reg #(
  parameter int unsigned W      = 2,
  parameter int unsigned DW     = 32,
  parameter int unsigned NWORDS = (W + DW - 1) / DW,
  parameter int unsigned SELW   = (NWORDS > 1) ? $clog2(NWORDS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic [W-1:0]    d,
  input  logic [SELW-1:0] sel,
  input  logic            cp_we,
  input  logic [DW-1:0]   cp_in,
  output logic [W-1:0]    q,
  output logic [DW-1:0]   cp_rdata
);

  localparam int unsigned PW = NWORDS * DW;  // padded width

  logic [PW-1:0] q_pad;
  logic [PW-1:0] cp_pad;
  logic [PW-1:0] wmask;

  assign q_pad = PW'(q);

  // CP read mux
  always_comb begin
    cp_rdata = '0;
    for (int unsigned k = 0; k < NWORDS; k++)
      if (SELW'(k) == sel) cp_rdata = q_pad[k*DW +: DW];
  end

  // CP restore mux: which bits take cp_in this cycle
  always_comb begin
    wmask  = '0;
    cp_pad = '0;
    for (int unsigned k = 0; k < NWORDS; k++) begin
      cp_pad[k*DW +: DW] = cp_in;
      if (cp_we && SELW'(k) == sel) wmask[k*DW +: DW] = '1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) q <= '0;
    else begin
      for (int unsigned b = 0; b < W; b++) begin
        if (wmask[b])  q[b] <= cp_pad[b];
        else if (en)   q[b] <= d[b];
      end
    end
  end

endmodule
