// Modulo-4 counter with checkpointing, built as a checkpoint FSM.
//
// The counter 0 -> 1 -> 2 -> 3 -> 0 (output = state) is wrapped by the generic CFSM
// so that a checkpoint may be saved only in states 0 and 2 (Sc = {0, 2}), restored
// from the input i_c, or swapped with the current state. The reachable state space
// is the pair (state, ckpt), twice the counter's own. This is exactly the textbook
// example of the CFSM construction; N and the checkpoint set are parameters.
// Interface: out = omega of the state actually stepped from (i_c during a restore),
// ckpt = latest saved checkpoint. One transition per clock.
module cfsm_mod4 #(
  parameter int unsigned N       = 4,
  parameter int unsigned SW      = (N > 1) ? $clog2(N) : 1,
  parameter logic [2**SW-1:0] SC_MASK = 4'b0101
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          i_save,
  input  logic          i_restore,
  input  logic [SW-1:0] i_c,
  output logic [SW-1:0] out,
  output logic [SW-1:0] ckpt,
  output logic [SW-1:0] state
);

  logic [SW-1:0] sel_state;
  logic [SW-1:0] next_state;

  cfsm #(.SW(SW), .SC_MASK(SC_MASK), .S0('0)) u_cfsm (
    .clk, .rst_n, .i_save, .i_restore, .i_c,
    .sel_state, .next_state, .state, .ckpt
  );

  mod_counter_fsm #(.N(N), .W(SW)) u_fsm (
    .s(sel_state), .next_s(next_state), .out(out)
  );

endmodule
