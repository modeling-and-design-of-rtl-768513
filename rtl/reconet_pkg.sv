// Shared types and constants of the ReCoNet node hardware.
//
// The node's CPU reaches every hardware task slot and the link monitors over one
// simple memory-mapped bus (word addressed, 32-bit data, single-cycle access). The
// request bundle is a struct so that the decoder and the slaves share one type.
// The register map below is this design's own choice; only the existence of an
// address/data bus towards the state registers follows the described architecture.
package reconet_pkg;

  localparam int unsigned BUS_AW = 10;  // word address width
  localparam int unsigned BUS_DW = 32;  // data width (a 32-bit softcore CPU)

  typedef struct packed {
    logic              rd;
    logic              wr;
    logic [BUS_AW-1:0] addr;
    logic [BUS_DW-1:0] wdata;
  } bus_req_t;

  // Slot select, addr[9:8]
  typedef enum logic [1:0] {
    SLOT_SCAN   = 2'd0,
    SLOT_SHADOW = 2'd1,
    SLOT_MM     = 2'd2,
    SLOT_LINK   = 2'd3
  } slot_e;

  // Word offsets inside a task slot, addr[7:0]
  localparam logic [7:0] REG_CTRL   = 8'h00;  // bit0 EN, bit1 HALT
  localparam logic [7:0] REG_CMD    = 8'h01;  // bit0 SAVE, bit1 RESTORE, bit2 SWAP
  localparam logic [7:0] REG_STATUS = 8'h02;  // bit0 BUSY, [31:16] stopped cycles
  localparam logic [7:0] REG_OUT    = 8'h03;  // task output
  localparam logic [7:0] REG_CKPT   = 8'h40;  // checkpoint words 0x40..0x7F

  localparam int unsigned CKPT_WORDS_MAX = 64;  // 2048 state bits per slot

  // Word offsets in the network block (link monitors and task message port)
  localparam logic [7:0] REG_LINK_UP    = 8'h00;  // current link_up bits
  localparam logic [7:0] REG_LINK_EVENT = 8'h01;  // sticky change events, write 1 to clear
  localparam logic [7:0] REG_MP_CTRL    = 8'h02;  // bit0 FREEZE
  localparam logic [7:0] REG_MP_SEQ     = 8'h03;  // [7:0] exp_seq, [15:8] tx_seq, [23:16] held; write loads both
  localparam logic [7:0] REG_MP_WDATA   = 8'h04;  // data for the next local-data-set entry write
  localparam logic [7:0] REG_MP_LDS     = 8'h20;  // 0x20+2k: {valid, seq} of entry k, 0x21+2k: data

  localparam logic [2:0] CMD_SAVE    = 3'b001;
  localparam logic [2:0] CMD_RESTORE = 3'b010;
  localparam logic [2:0] CMD_SWAP    = 3'b100;

endpackage
