// Hardware task slot checkpointed by memory mapping.
//
// The task's (modulo-N counter) state flip-flops are an mm_state_reg: the CPU reads
// the state words through the checkpoint read multiplexer and writes them back
// through the checkpoint restore multiplexer, at word addresses REG_CKPT+k, with no
// buffer in between. To read a consistent checkpoint the CPU sets CTRL.HALT, reads
// the words and clears HALT; a rollback writes the words while halted. The task is
// stopped for as long as the CPU keeps HALT set; STATUS[31:16] counts those cycles
// since HALT was last set. CTRL.EN enables the task. CMD is ignored and BUSY is
// always zero. The HALT protocol and register map are this design's own; direct
// word access to the flip-flops follows the described memory-mapped scheme.
module mm_ckpt_slot
  import reconet_pkg::*;
#(
  parameter longint unsigned N   = 4,
  parameter int unsigned W      = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned NWORDS = (W + BUS_DW - 1) / BUS_DW,
  parameter int unsigned SELW   = (NWORDS > 1) ? $clog2(NWORDS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sel,
  input  bus_req_t          bus_req,
  output logic [BUS_DW-1:0] bus_rdata,
  output logic [BUS_DW-1:0] task_out
);

  logic          en_r, halt_r;
  logic [15:0]   stopped;
  logic [W-1:0]  q, next_q, out_w;
  logic [BUS_DW-1:0] cp_rdata;
  logic          in_ckpt, cp_we;

  logic          wr_ok;
  logic [7:0]    off;
  assign off     = bus_req.addr[7:0];
  assign wr_ok   = sel && bus_req.wr;
  assign in_ckpt = (off >= REG_CKPT) && (off < REG_CKPT + 8'(NWORDS));
  assign cp_we   = wr_ok && in_ckpt;

  mod_counter_fsm #(.N(N), .W(W)) u_task (.s(q), .next_s(next_q), .out(out_w));

  mm_state_reg #(.W(W), .DW(BUS_DW), .NWORDS(NWORDS), .SELW(SELW)) u_reg (
    .clk, .rst_n, .en(en_r && !halt_r), .d(next_q),
    .sel(SELW'(off - REG_CKPT)), .cp_we, .cp_in(bus_req.wdata),
    .q, .cp_rdata
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      en_r    <= 1'b0;
      halt_r  <= 1'b0;
      stopped <= '0;
    end else begin
      if (wr_ok && off == REG_CTRL) begin
        en_r   <= bus_req.wdata[0];
        halt_r <= bus_req.wdata[1];
        if (bus_req.wdata[1] && !halt_r) stopped <= '0;
      end else if (halt_r && en_r) begin
        stopped <= stopped + 16'd1;
      end
    end
  end

  assign task_out = BUS_DW'(out_w);

  always_comb begin
    bus_rdata = '0;
    if (off == REG_CTRL)        bus_rdata = {30'd0, halt_r, en_r};
    else if (off == REG_STATUS) bus_rdata = {stopped, 16'd0};
    else if (off == REG_OUT)    bus_rdata = task_out;
    else if (in_ckpt)           bus_rdata = cp_rdata;
  end

endmodule
