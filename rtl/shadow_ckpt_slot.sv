// Hardware task slot checkpointed through shadow registers.
//
// The task's (modulo-N counter) state flip-flops are a shadow_chain_reg: every
// flip-flop has a shadow twin, and the twins form a scan chain. The task is never
// stopped by checkpointing:
//   SAVE    : one cycle "store" copies the whole state into the shadows, then the
//             shadow chain is rotated W times as a ring and each bit leaving it is
//             written to the checkpoint buffer (W+1 cycles until the buffer holds it).
//   RESTORE : the buffer is shifted into the shadow chain in W cycles, then one
//             "restore" cycle loads the shadows into the main flip-flops (rollback).
//   SWAP    : one cycle exchanging main and shadow state.
// STATUS.BUSY is high while a command runs; STATUS[31:16] counts the cycles the task
// was stopped by the last command, which is always zero here. CTRL, OUT and the
// buffer words are laid out as in the scan-chain slot. The command sequencing and
// register map are this design's own; the one-cycle store/restore/swap follows the
// described shadow-register scheme.
module shadow_ckpt_slot
  import reconet_pkg::*;
#(
  parameter longint unsigned N   = 4,
  parameter int unsigned W      = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned NWORDS = (W + BUS_DW - 1) / BUS_DW
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sel,
  input  bus_req_t          bus_req,
  output logic [BUS_DW-1:0] bus_rdata,
  output logic [BUS_DW-1:0] task_out,
  output logic              busy
);

  localparam int unsigned PW = NWORDS * BUS_DW;
  localparam int unsigned CW = (W > 1) ? $clog2(W) : 1;

  typedef enum logic [2:0] {S_IDLE, S_STORE, S_SHOUT, S_SHIN, S_RESTORE, S_SWAP} state_e;

  state_e        st;
  logic          en_r, halt_r;
  logic [CW-1:0] cnt;
  logic [PW-1:0] ckbuf;
  logic [15:0]   stopped;

  logic [W-1:0]  q, shadow, next_q, out_w;
  logic          scan_out, scan_in, run;
  logic          store, restore, shift;

  logic          wr_ok;
  logic [7:0]    off;
  logic [5:0]    widx;
  assign off   = bus_req.addr[7:0];
  assign widx  = off[5:0];
  assign wr_ok = sel && bus_req.wr;

  assign busy    = (st != S_IDLE);
  assign run     = en_r && !halt_r;
  assign store   = (st == S_STORE) || (st == S_SWAP);
  assign restore = (st == S_RESTORE) || (st == S_SWAP);
  assign shift   = (st == S_SHOUT) || (st == S_SHIN);

  logic [31:0] bitpos;
  assign bitpos  = (W - 1) - 32'(cnt);
  assign scan_in = (st == S_SHOUT) ? scan_out : ckbuf[bitpos];

  mod_counter_fsm #(.N(N), .W(W)) u_task (.s(q), .next_s(next_q), .out(out_w));

  shadow_chain_reg #(.W(W)) u_reg (
    .clk, .rst_n, .en(run), .d(next_q), .store, .restore, .shift,
    .scan_in, .q, .shadow, .scan_out
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st      <= S_IDLE;
      en_r    <= 1'b0;
      halt_r  <= 1'b0;
      cnt     <= '0;
      ckbuf   <= '0;
      stopped <= '0;
    end else begin
      if (wr_ok && off == REG_CTRL) begin
        en_r   <= bus_req.wdata[0];
        halt_r <= bus_req.wdata[1];
      end
      unique case (st)
        S_IDLE: begin
          cnt <= '0;
          if (wr_ok && off == REG_CMD) begin
            if (bus_req.wdata[0])      st <= S_STORE;
            else if (bus_req.wdata[1]) st <= S_SHIN;
            else if (bus_req.wdata[2]) st <= S_SWAP;
          end
          if (wr_ok && off >= REG_CKPT && off < REG_CKPT + 8'(NWORDS))
            ckbuf[32'(widx)*BUS_DW +: BUS_DW] <= bus_req.wdata;
        end
        S_STORE: st <= S_SHOUT;
        S_SHOUT, S_SHIN: begin
          if (st == S_SHOUT) ckbuf[bitpos] <= scan_out;
          if (cnt == CW'(W - 1)) st <= (st == S_SHIN) ? S_RESTORE : S_IDLE;
          else                   cnt <= cnt + 1'b1;
        end
        S_RESTORE, S_SWAP: st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  assign task_out = BUS_DW'(out_w);

  always_comb begin
    bus_rdata = '0;
    if (off == REG_CTRL)        bus_rdata = {30'd0, halt_r, en_r};
    else if (off == REG_STATUS) bus_rdata = {stopped, 15'd0, busy};
    else if (off == REG_OUT)    bus_rdata = task_out;
    else if (off >= REG_CKPT && off < REG_CKPT + 8'(NWORDS))
      bus_rdata = ckbuf[32'(widx)*BUS_DW +: BUS_DW];
  end

  // store and shift never act on the shadows in the same cycle
  a_store_shift: assert property (@(posedge clk) disable iff (!rst_n) !(store && shift));

endmodule
