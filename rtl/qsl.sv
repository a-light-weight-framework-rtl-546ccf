// qsl: quotient select logic of the radix-2 SRT divider.
//
// The input is the 4-bit two's complement sum of the top four carry-save
// digits of the partial remainder w, with weights -2, 1, 1/2 and 1/4. The
// digits below are ignored; because both words are two's complement they
// can only add a value in [0, 1/2), so w lies in [s, s + 1/2). With the
// divider's invariant |w| <= d < 1 and a normalised divisor d in [1/2, 1),
// this range alone decides a safe digit:
//   0000 0001 0010 0011       -> +1   (w >= 0)
//   1011 1100 1101 1110       -> -1   (w <  0)
//   1111                      -> 0    (-1/4 <= w < 1/4)
// The table follows the divider description. The sums 0100 to 1010 cannot
// occur while the invariant holds; for them this design returns the digit
// that the sign bit suggests and raises "unreachable", which the stage checks
// with an assertion.
//
// Interface: combinational; the digit is one-hot (srt_pkg::qdigit_t).
module qsl
  import srt_pkg::*;
(
  input  logic [3:0] cra_sum,
  output qdigit_t    q,
  output logic       unreachable
);

  always_comb begin
    unreachable = 1'b0;
    unique case (cra_sum)
      4'b0000, 4'b0001, 4'b0010, 4'b0011: q = Q_POS;
      4'b1011, 4'b1100, 4'b1101, 4'b1110: q = Q_NEG;
      4'b1111:                            q = Q_ZERO;
      default: begin
        unreachable = 1'b1;
        q = cra_sum[3] ? Q_NEG : Q_POS;
      end
    endcase
  end

endmodule
