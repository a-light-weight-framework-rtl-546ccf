// qd_mux: selects the divisor multiple that one SRT step subtracts.
//
// A stage computes w = r - q*d, where q is the quotient digit chosen by the
// previous stage. This mux turns q into the third operand of the carry-save
// adder: for q = +1 it supplies the bitwise inverse of d together with a
// carry-in of 1 (so that ~d + 1 = -d is added), for q = -1 it supplies d, and
// for q = 0, or an empty digit, it supplies zero. Choosing between d, 0 and -d
// by the previous digit follows the divider's stage diagram; forming -d as an
// inverted word plus a carry-in in the free carry slot is this design's choice.
//
// Interface: combinational. d is the divisor in remainder format (N bits, two
// integer bits of weight -2 and 1, the rest fraction).
module qd_mux
  import srt_pkg::*;
#(
  parameter int unsigned N = 55
) (
  input  qdigit_t      q,
  input  logic [N-1:0] d,
  output logic [N-1:0] addend,
  output logic         cin
);

  always_comb begin
    if (q.pos) begin
      addend = ~d;
      cin    = 1'b1;
    end else if (q.neg) begin
      addend = d;
      cin    = 1'b0;
    end else begin
      addend = '0;
      cin    = 1'b0;
    end
  end

endmodule
