// Hardware of one node of a self-repairing reconfigurable network (ReCoNet).
//
// A node is an FPGA with a softcore CPU and hardware task modules. Tasks must be
// movable between nodes and between hardware and software at run time, so the
// state of every hardware task has to be saved (checkpoint) and loaded back
// (rollback, or start of a moved task). This top gathers, on one CPU bus slave:
//   slot 0  a hardware task whose state is read out through a scan chain
//   slot 1  a hardware task whose state is copied to shadow registers
//   slot 2  a hardware task whose state registers are memory mapped
//   slot 3  the network block: the link-state monitors of the node's NPORTS
//           transceiver ports and the message port of a hardware task
// Each task slot has an enable bit: the set of "configured" modules is changed by
// enabling and disabling them. The network block keeps the current state of each
// port and a sticky change event per port (write 1 to clear) that raises link_irq,
// so the operating system can reroute as soon as a link goes down. The message port
// (mp_* ports) delivers a hardware task's incoming messages in identifier order and
// numbers its outgoing ones; the CPU can freeze it for a checkpoint, read its
// sequence counters and local data set, and load them back for a rollback.
// Beside the node logic, and not connected to it, sits the four-state counter
// wrapped as a checkpoint FSM (cf_* ports), the formal model of a checkpointable
// hardware task.
// Bus: word address addr[9:8] = slot, addr[7:0] = register (see reconet_pkg).
// Writes act at the clock edge; read data is registered and valid one cycle after
// rd (bus_rvalid). The CPU, its memory, the link transceivers and the tasks'
// original designs are outside this module. The address map and the bus timing are
// this design's own.
module reconet_node_hw
  import reconet_pkg::*;
#(
  parameter longint unsigned TASK_N     = 4,
  parameter int unsigned NPORTS         = 3,
  parameter int unsigned LINK_TIMEOUT   = 64,
  parameter int unsigned LINK_UP_COUNT  = 8,
  parameter int unsigned LINK_ERR_LIMIT = 4,
  parameter int unsigned MP_DEPTH       = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // CPU bus
  input  bus_req_t               bus_req,
  output logic [BUS_DW-1:0]      bus_rdata,
  output logic                   bus_rvalid,
  // transceiver ports
  input  logic [NPORTS-1:0]      rx_symbol,
  input  logic [NPORTS-1:0]      rx_error,
  output logic [NPORTS-1:0]      link_up,
  output logic                   link_irq,
  // message port of a hardware task (8-bit identifiers, 32-bit messages)
  input  logic                   mp_rx_valid,
  input  logic [7:0]             mp_rx_seq,
  input  logic [BUS_DW-1:0]      mp_rx_data,
  output logic                   mp_rx_ready,
  output logic                   mp_dlv_valid,
  output logic [7:0]             mp_dlv_seq,
  output logic [BUS_DW-1:0]      mp_dlv_data,
  input  logic                   mp_dlv_ready,
  input  logic                   mp_task_tx_valid,
  input  logic [BUS_DW-1:0]      mp_task_tx_data,
  output logic                   mp_task_tx_ready,
  output logic                   mp_tx_valid,
  output logic [7:0]             mp_tx_seq,
  output logic [BUS_DW-1:0]      mp_tx_data,
  input  logic                   mp_tx_ready,
  // task outputs
  output logic [2:0][BUS_DW-1:0] task_out,
  output logic [1:0]             ckpt_busy,
  // checkpoint FSM example
  input  logic                   cf_save,
  input  logic                   cf_restore,
  input  logic [1:0]             cf_ic,
  output logic [1:0]             cf_out,
  output logic [1:0]             cf_ckpt,
  output logic [1:0]             cf_state
);

  slot_e                          slot;
  logic [3:0]                     sel;
  logic [3:0][BUS_DW-1:0]         rdata;
  logic [NPORTS-1:0]              went_down, went_up, events;

  assign slot = slot_e'(bus_req.addr[9:8]);
  always_comb begin
    sel       = '0;
    sel[slot] = 1'b1;
  end

  scan_ckpt_slot #(.N(TASK_N)) u_scan (
    .clk, .rst_n, .sel(sel[SLOT_SCAN]), .bus_req,
    .bus_rdata(rdata[SLOT_SCAN]), .task_out(task_out[0]), .busy(ckpt_busy[0])
  );

  shadow_ckpt_slot #(.N(TASK_N)) u_shadow (
    .clk, .rst_n, .sel(sel[SLOT_SHADOW]), .bus_req,
    .bus_rdata(rdata[SLOT_SHADOW]), .task_out(task_out[1]), .busy(ckpt_busy[1])
  );

  mm_ckpt_slot #(.N(TASK_N)) u_mm (
    .clk, .rst_n, .sel(sel[SLOT_MM]), .bus_req,
    .bus_rdata(rdata[SLOT_MM]), .task_out(task_out[2])
  );

  for (genvar p = 0; p < NPORTS; p++) begin : g_link
    link_monitor #(
      .TIMEOUT(LINK_TIMEOUT), .UP_COUNT(LINK_UP_COUNT), .ERR_LIMIT(LINK_ERR_LIMIT)
    ) u_mon (
      .clk, .rst_n, .rx_symbol(rx_symbol[p]), .rx_error(rx_error[p]),
      .link_up(link_up[p]), .went_down(went_down[p]), .went_up(went_up[p])
    );
  end

  // sticky link events, write 1 to clear; a new event wins over the clear
  always_ff @(posedge clk) begin
    if (!rst_n) events <= '0;
    else begin
      for (int p = 0; p < int'(NPORTS); p++) begin
        if (went_down[p] || went_up[p]) events[p] <= 1'b1;
        else if (sel[SLOT_LINK] && bus_req.wr && bus_req.addr[7:0] == REG_LINK_EVENT &&
                 bus_req.wdata[p])
          events[p] <= 1'b0;
      end
    end
  end
  assign link_irq = |events;

  // ---- message port and its checkpoint access
  localparam int unsigned MIW = (MP_DEPTH > 1) ? $clog2(MP_DEPTH) : 1;

  logic              mp_freeze, net_wr, lds_sel, lds_we;
  logic [7:0]        mp_exp_seq, lds_seq;
  logic [MIW:0]      mp_held;
  logic [MIW-1:0]    lds_idx;
  logic              lds_valid;
  logic [BUS_DW-1:0] lds_data, mp_wdata;
  logic [7:0]        off;

  assign off     = bus_req.addr[7:0];
  assign net_wr  = sel[SLOT_LINK] && bus_req.wr;
  assign lds_sel = (off >= REG_MP_LDS) && (off < REG_MP_LDS + 8'(2 * MP_DEPTH));
  assign lds_idx = MIW'((off - REG_MP_LDS) >> 1);
  assign lds_we  = net_wr && lds_sel && !off[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mp_freeze <= 1'b0;
      mp_wdata  <= '0;
    end else begin
      if (net_wr && off == REG_MP_CTRL)  mp_freeze <= bus_req.wdata[0];
      if (net_wr && off == REG_MP_WDATA) mp_wdata  <= bus_req.wdata;
    end
  end

  task_msg_port #(.SEQW(8), .DW(BUS_DW), .DEPTH(MP_DEPTH)) u_msg_port (
    .clk, .rst_n,
    .rx_valid(mp_rx_valid), .rx_seq(mp_rx_seq), .rx_data(mp_rx_data), .rx_ready(mp_rx_ready),
    .dlv_valid(mp_dlv_valid), .dlv_seq(mp_dlv_seq), .dlv_data(mp_dlv_data),
    .dlv_ready(mp_dlv_ready),
    .task_tx_valid(mp_task_tx_valid), .task_tx_data(mp_task_tx_data),
    .task_tx_ready(mp_task_tx_ready),
    .tx_valid(mp_tx_valid), .tx_seq(mp_tx_seq), .tx_data(mp_tx_data), .tx_ready(mp_tx_ready),
    .freeze(mp_freeze), .exp_seq(mp_exp_seq), .held(mp_held),
    .lds_idx, .lds_valid, .lds_seq, .lds_data,
    .lds_we, .lds_widx(lds_idx), .lds_wvalid(bus_req.wdata[31]), .lds_wseq(bus_req.wdata[7:0]), .lds_wdata(mp_wdata),
    .load_seq(net_wr && off == REG_MP_SEQ),
    .load_exp_seq(bus_req.wdata[7:0]), .load_tx_seq(bus_req.wdata[15:8])
  );

  always_comb begin
    rdata[SLOT_LINK] = '0;
    if (off == REG_LINK_UP)         rdata[SLOT_LINK] = BUS_DW'(link_up);
    else if (off == REG_LINK_EVENT) rdata[SLOT_LINK] = BUS_DW'(events);
    else if (off == REG_MP_CTRL)    rdata[SLOT_LINK] = BUS_DW'(mp_freeze);
    else if (off == REG_MP_SEQ)     rdata[SLOT_LINK] = {8'd0, 8'(mp_held), mp_tx_seq, mp_exp_seq};
    else if (off == REG_MP_WDATA)   rdata[SLOT_LINK] = mp_wdata;
    else if (lds_sel && !off[0])    rdata[SLOT_LINK] = {lds_valid, 23'd0, lds_seq};
    else if (lds_sel)               rdata[SLOT_LINK] = lds_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bus_rdata  <= '0;
      bus_rvalid <= 1'b0;
    end else begin
      bus_rvalid <= bus_req.rd;
      if (bus_req.rd) bus_rdata <= rdata[slot];
    end
  end

  cfsm_mod4 #(.N(4)) u_cfsm_example (
    .clk, .rst_n, .i_save(cf_save), .i_restore(cf_restore), .i_c(cf_ic),
    .out(cf_out), .ckpt(cf_ckpt), .state(cf_state)
  );

  a_rd_wr_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(bus_req.rd && bus_req.wr));

endmodule
