// Checkpoint FSM (CFSM) wrapper.
//
// Turns any finite state machine m = (I, O, S, delta, omega, s0) into its
// checkpoint FSM cm: the state becomes the pair (s, s') of the current state and the
// latest saved checkpoint, and two control inputs save and restore are added.
// The original machine's delta and omega stay outside this module as combinational
// logic: the wrapper presents sel_state (the restored checkpoint i_c during a
// restore, the current state s otherwise) and takes back next_state = delta(sel_state, i).
// The omega seen by the outside is therefore omega(sel_state, i), and ckpt is the
// second output component s'.
//
// Transition rules (save, restore):
//   (0,0)               -> (delta(s,i),   s')
//   (1,0), s in Sc      -> (delta(s,i),   s )   save
//   (1,0), s not in Sc  -> (delta(s,i),   s')   save refused outside Sc
//   (0,1)               -> (delta(ic,i),  s')   restore
//   (1,1), s in Sc      -> (delta(ic,i),  s )   swap
//   (1,1), s not in Sc  -> (delta(s,i),   s')   both refused
// These rows and the reset value (s0, s0) follow the formal definition of the CFSM;
// the last row is taken literally even though it also drops the restore. In that
// row the output is omega(s), the state actually stepped from, not omega(ic). The set Sc
// is a bit mask over the 2**SW state codes (SC_MASK[k] = 1 marks state k).
// Timing: one transition per clock; save/restore are sampled with the clock edge.
module cfsm #(
  parameter int unsigned      SW      = 2,
  parameter logic [2**SW-1:0] SC_MASK = 4'b0101,
  parameter logic [SW-1:0]    S0      = '0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          i_save,
  input  logic          i_restore,
  input  logic [SW-1:0] i_c,
  output logic [SW-1:0] sel_state,
  input  logic [SW-1:0] next_state,
  output logic [SW-1:0] state,
  output logic [SW-1:0] ckpt
);

  logic s_in_sc;
  logic use_ic;
  logic take_ckpt;

  assign s_in_sc   = SC_MASK[state];
  // restore is honoured alone, or together with save only in a checkpoint state
  assign use_ic    = i_restore && (!i_save || s_in_sc);
  assign take_ckpt = i_save && s_in_sc;
  assign sel_state = use_ic ? i_c : state;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S0;
      ckpt  <= S0;
    end else begin
      state <= next_state;
      if (take_ckpt) ckpt <= state;
    end
  end

endmodule
