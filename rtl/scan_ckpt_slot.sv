// Hardware task slot checkpointed through a scan chain.
//
// The slot holds one hardware task (a modulo-N counter) whose state flip-flops are
// a scan_chain_reg, plus the bus interface that moves checkpoints between the chain
// and a checkpoint buffer the CPU can read and write.
//   SAVE    : the chain is switched to scan mode and rotated W times as a ring; the
//             bit leaving the chain each cycle is written into the buffer. After W
//             cycles the state is back in place and the task resumes.
//   RESTORE : the buffer is shifted into the chain in W cycles (rollback).
// While either runs (STATUS.BUSY) the task is stopped, so a checkpoint costs W cycles
// of task time; STATUS[31:16] reports that count for the last command. CTRL.EN
// enables the task (a hardware module is "configured" by enabling it), CTRL.HALT
// stops it. Buffer word k holds state bits 32k..32k+31 at word address REG_CKPT+k.
// The bus is a single-cycle slave: writes take effect at the clock edge, read data
// is combinational from the address. Commands and buffer writes are ignored while
// busy. The sequencer and register map are this design's own; the scan chain with a
// ring shift follows the described architecture.
module scan_ckpt_slot
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

  typedef enum logic [1:0] {S_IDLE, S_SAVE, S_RESTORE} state_e;

  state_e        st;
  logic          en_r, halt_r;
  logic [CW-1:0] cnt;
  logic [PW-1:0] ckbuf;
  logic [15:0]   stopped;

  logic [W-1:0]  q, next_q, out_w;
  logic          scan_out, scan_in, run;

  logic          wr_ok;
  logic [7:0]    off;
  logic [5:0]    widx;
  assign off   = bus_req.addr[7:0];
  assign widx  = off[5:0];
  assign wr_ok = sel && bus_req.wr;

  assign busy = (st != S_IDLE);
  assign run  = en_r && !halt_r && !busy;

  // bit handled in this shift cycle: W-1 first
  logic [31:0] bitpos;
  assign bitpos  = (W - 1) - 32'(cnt);
  assign scan_in = (st == S_SAVE) ? scan_out : ckbuf[bitpos];

  mod_counter_fsm #(.N(N), .W(W)) u_task (.s(q), .next_s(next_q), .out(out_w));

  scan_chain_reg #(.W(W)) u_reg (
    .clk, .rst_n, .en(run), .scan_en(busy), .d(next_q),
    .scan_in, .q, .scan_out
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
            if (bus_req.wdata[0])      begin st <= S_SAVE;    stopped <= '0; end
            else if (bus_req.wdata[1]) begin st <= S_RESTORE; stopped <= '0; end
          end
          if (wr_ok && off >= REG_CKPT && off < REG_CKPT + 8'(NWORDS))
            ckbuf[32'(widx)*BUS_DW +: BUS_DW] <= bus_req.wdata;
        end
        S_SAVE, S_RESTORE: begin
          stopped <= stopped + 16'd1;
          if (st == S_SAVE) ckbuf[bitpos] <= scan_out;
          if (cnt == CW'(W - 1)) st <= S_IDLE;
          else                   cnt <= cnt + 1'b1;
        end
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

  // a checkpoint transfer never runs longer than the chain
  a_cnt_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> (cnt <= CW'(W - 1)));

endmodule
