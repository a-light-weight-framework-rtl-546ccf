// pc_and_or: single-rail precharged AND-OR gate, y = a AND (b OR c).
//
// A precharged_gate whose pull-down network is transistor a in series with
// the parallel pair b, c: the node discharges when a is high and b or c is
// high. It computes the function during evaluation and keeps it in hold;
// unlike the dual-rail version it cannot signal completion, because a low
// output means either "false" or "not yet evaluated". The network follows
// the divider's example gate.
//
// Interface: asynchronous, no clock. Inputs must be low while pb is low and
// may only rise while pb is high.
module pc_and_or (
  input  logic pb,
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);

  precharged_gate u_gate (.pb(pb), .pull_down(a & (b | c)), .y(y));

endmodule
