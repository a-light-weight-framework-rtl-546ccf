// precharged_gate: generic precharged (domino-style) logic gate.
//
// A dynamic node x is pulled high by the precharge device while pb is low,
// and pulled low during evaluation when the n-channel pull-down network
// conducts. A weak feedback inverter (keeper) holds x whenever neither acts.
// The output y is the inverse of x. The pull-down network itself is outside
// this module: its conduction condition arrives on pull_down, so one gate
// body serves every logic function. Three phases result: precharge (pb low,
// y low), evaluate (pb high, y rises once pull_down is seen) and hold (pb
// high, inputs back low, y keeps its value until the next precharge).
//
// The three phases, the precharge device, keeper and output inverter follow
// the generic gate of the divider's logic family. Modelling the node with its
// keeper as a level-sensitive latch is this design's choice; the one latch
// that synthesis reports is that keeper and is intended.
//
// Interface: asynchronous, no clock. pull_down must be low while pb is low
// (the logic inputs are low during precharge).
module precharged_gate (
  input  logic pb,         // precharge-bar: low = precharge
  input  logic pull_down,  // the pull-down network conducts
  output logic y
);

  logic x;  // dynamic node, high = precharged

  always_latch begin
    if (!pb)            x = 1'b1;
    else if (pull_down) x = 1'b0;
  end

  assign y = ~x;

endmodule
