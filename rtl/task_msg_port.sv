// Message port of a hardware task: in-order delivery through a local data set.
//
// Tasks exchange messages over a network that may reroute them, so messages can
// arrive out of order. Every message a task produces gets the next consecutive
// identifier (tx side). On the receive side the port keeps the identifier it must
// deliver next (exp_seq); a message that arrives early is parked in the local data
// set, a small table indexed by the low bits of its identifier, and handed to the
// task only when its turn comes. A checkpoint request (freeze) makes the task stop
// consuming and producing messages: deliveries and the tx side stop, while arriving
// messages keep being parked, so the task reaches a consistent state. The local
// data set and the two sequence counters are the port's part of a checkpoint: they
// can be read entry by entry (lds_*) and written back, entry by entry at index
// lds_widx, and with load_* for the counters, for a rollback.
//
// Receive: rx_valid/rx_ready handshake. An identifier within DEPTH ahead of exp_seq
// is stored; one behind exp_seq (half the identifier space or less behind) is a
// stale duplicate and is accepted and dropped; anything further ahead is held off
// with rx_ready = 0. Delivery: dlv_valid/dlv_ready, one message per cycle, one cycle
// after arrival at the earliest. Transmit: task_tx_valid/task_tx_ready from the task,
// tx_valid/tx_ready towards the network with tx_seq attached.
// The consecutive identifiers, the parking of early messages and the freeze follow
// the described consistency model; window size, identifier width, the duplicate
// rule and the checkpoint access ports are this design's choices.
module task_msg_port #(
  parameter int unsigned SEQW  = 8,
  parameter int unsigned DW    = 32,
  parameter int unsigned DEPTH = 8,
  parameter int unsigned IW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // from the network
  input  logic            rx_valid,
  input  logic [SEQW-1:0] rx_seq,
  input  logic [DW-1:0]   rx_data,
  output logic            rx_ready,
  // to the task, in order
  output logic            dlv_valid,
  output logic [SEQW-1:0] dlv_seq,
  output logic [DW-1:0]   dlv_data,
  input  logic            dlv_ready,
  // from the task
  input  logic            task_tx_valid,
  input  logic [DW-1:0]   task_tx_data,
  output logic            task_tx_ready,
  // to the network
  output logic            tx_valid,
  output logic [SEQW-1:0] tx_seq,
  output logic [DW-1:0]   tx_data,
  input  logic            tx_ready,
  // checkpoint control
  input  logic            freeze,
  output logic [SEQW-1:0] exp_seq,
  output logic [IW:0]     held,
  input  logic [IW-1:0]   lds_idx,
  output logic            lds_valid,
  output logic [SEQW-1:0] lds_seq,
  output logic [DW-1:0]   lds_data,
  input  logic            lds_we,
  input  logic [IW-1:0]   lds_widx,
  input  logic            lds_wvalid,
  input  logic [SEQW-1:0] lds_wseq,
  input  logic [DW-1:0]   lds_wdata,
  input  logic            load_seq,
  input  logic [SEQW-1:0] load_exp_seq,
  input  logic [SEQW-1:0] load_tx_seq
);

  logic [DEPTH-1:0]           v;
  logic [DEPTH-1:0][SEQW-1:0] mseq;
  logic [DEPTH-1:0][DW-1:0]   mdata;

  logic [SEQW-1:0] diff;
  logic            stale, in_win, store;
  logic [IW-1:0]   rx_idx, ex_idx, w_idx;
  logic            deliver;

  assign diff   = rx_seq - exp_seq;
  assign stale  = diff[SEQW-1];
  assign in_win = !stale && (diff < SEQW'(DEPTH));
  assign rx_ready = stale || in_win;
  assign rx_idx = rx_seq[IW-1:0];
  assign ex_idx = exp_seq[IW-1:0];
  assign w_idx  = lds_widx;

  assign dlv_valid = !freeze && v[ex_idx];
  assign dlv_seq   = exp_seq;
  assign dlv_data  = mdata[ex_idx];
  assign deliver   = dlv_valid && dlv_ready;
  // a copy of the message being delivered right now is a duplicate
  assign store     = rx_valid && in_win && !(deliver && rx_idx == ex_idx);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v       <= '0;
      mseq    <= '0;
      exp_seq <= '0;
    end else if (load_seq) begin
      exp_seq <= load_exp_seq;
    end else begin
      if (deliver) begin
        v[ex_idx] <= 1'b0;
        exp_seq   <= exp_seq + 1'b1;
      end
      if (store) begin
        v[rx_idx]     <= 1'b1;
        mseq[rx_idx]  <= rx_seq;
        mdata[rx_idx] <= rx_data;
      end
      if (lds_we) begin
        v[w_idx]     <= lds_wvalid;
        mseq[w_idx]  <= lds_wseq;
        mdata[w_idx] <= lds_wdata;
      end
    end
  end

  always_comb begin
    held = '0;
    for (int unsigned k = 0; k < DEPTH; k++) held += (IW+1)'(v[k]);
  end

  assign lds_valid = v[lds_idx];
  assign lds_seq   = mseq[lds_idx];
  assign lds_data  = mdata[lds_idx];

  // transmit side: consecutive identifiers, stopped while frozen
  assign tx_valid      = task_tx_valid && !freeze;
  assign tx_data       = task_tx_data;
  assign task_tx_ready = tx_ready && !freeze;

  always_ff @(posedge clk) begin
    if (!rst_n)                   tx_seq <= '0;
    else if (load_seq)            tx_seq <= load_tx_seq;
    else if (tx_valid && tx_ready) tx_seq <= tx_seq + 1'b1;
  end

  // messages are only handed over in identifier order
  a_in_order: assert property (@(posedge clk) disable iff (!rst_n)
    dlv_valid |-> (mseq[ex_idx] == exp_seq));

endmodule
