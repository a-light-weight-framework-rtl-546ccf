// srt_pkg: types and helpers shared by the self-timed radix-2 SRT divider.
//
// A quotient digit travels between stages on three wires, one-hot: exactly one
// of pos/zero/neg is high for the digits +1, 0 and -1, and all three low means
// "empty" (the stage producing it is precharged or still evaluating). A
// non-empty digit is also the completion signal of the stage that drives it.
// The three-wire one-hot code and its four values follow the divider
// description; the order of the wires inside the struct is this design's choice.
package srt_pkg;

  typedef struct packed {
    logic pos;   // digit +1
    logic zero;  // digit  0
    logic neg;   // digit -1
  } qdigit_t;

  localparam qdigit_t Q_EMPTY = 3'b000;
  localparam qdigit_t Q_POS   = 3'b100;
  localparam qdigit_t Q_ZERO  = 3'b010;
  localparam qdigit_t Q_NEG   = 3'b001;

  // A digit carries a value (and signals completion) when any wire is high.
  function automatic logic q_valid(qdigit_t q);
    return q.pos | q.zero | q.neg;
  endfunction

  // The one-hot code forbids two wires high at once.
  function automatic logic q_legal(qdigit_t q);
    return !((q.pos & q.zero) | (q.pos & q.neg) | (q.zero & q.neg));
  endfunction

endpackage
