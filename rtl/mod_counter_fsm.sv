// Next-state and output logic of a modulo-N counter FSM.
//
// delta(s) = (s + 1) mod N and omega(s) = s, with no data input: the example task
// machine used throughout this design (N = 4 is the four-state counter that the
// checkpoint FSM is explained with). Purely combinational; W bits hold 0..N-1.
module mod_counter_fsm #(
  parameter longint unsigned N = 4,
  parameter int unsigned W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [W-1:0] s,
  output logic [W-1:0] next_s,
  output logic [W-1:0] out
);

  localparam logic [W-1:0] LAST = W'(N - 1);

  assign next_s = (s >= LAST) ? '0 : s + W'(1);
  assign out    = s;

endmodule
