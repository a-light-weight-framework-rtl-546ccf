// dr_and_or: precharged dual-rail AND-OR gate, y = a AND (b OR c).
//
// This is the logic family the divider stages are built from. Each rail is a
// precharged_gate: a dynamic node that the precharge device pulls high while
// pb is low, and an n-channel pull-down network that pulls it low during
// evaluation; the rail output is the inverse of the node, and a weak keeper
// holds the node when neither acts. The true rail pulls down when
// a.T AND (b.T OR c.T); the false rail when a.F OR (b.F AND c.F). Three phases
// result: precharge (pb low, both rails low = empty), evaluate (pb high,
// inputs arrive, exactly one rail rises) and hold (inputs return low, the
// keepers keep the result). y_empty is the NOR of the two rails and serves as
// completion detection. The networks, phases and completion NOR follow the
// divider's gate description; modelling each node as a level-sensitive latch
// (in precharged_gate) is this design's reading of "precharge device plus
// keeper". The two latches that synthesis reports are those keepers and are
// intended.
//
// Interface: asynchronous, no clock. Inputs are dual-rail (both low = empty)
// and must be empty while pb is low.
module dr_and_or (
  input  logic pb,
  input  logic a_t, a_f,
  input  logic b_t, b_f,
  input  logic c_t, c_f,
  output logic y_t, y_f,
  output logic y_empty
);

  // true rail: a.T AND (b.T OR c.T); false rail: a.F OR (b.F AND c.F)
  precharged_gate u_true  (.pb(pb), .pull_down(a_t & (b_t | c_t)), .y(y_t));
  precharged_gate u_false (.pb(pb), .pull_down(a_f | (b_f & c_f)), .y(y_f));

  assign y_empty = ~(y_t | y_f);

endmodule
