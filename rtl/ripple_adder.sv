// ripple_adder: W-bit two's complement carry-ripple adder.
//
// A chain of W one-bit full adders; bit i takes its carry-in from bit i-1 and
// the least significant bit from cin, so the sum settles in O(W) gate delays.
// In the divider it is used twice: 4 bits wide as the CRA of every stage,
// which resolves the top four carry-save digits of the partial remainder for
// quotient selection, and quotient-wide as the final converter that subtracts
// the -1 digit word from the +1 digit word. The ripple structure follows the
// adder description of the divider; using the same adder for the final
// conversion is this design's choice (a carry look-ahead adder would also do).
//
// Interface: purely combinational, sum = a + b + cin (mod 2^W), cout = carry
// out of the top bit.
module ripple_adder #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < int'(W); i++) begin : g_bit
    assign sum[i] = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);
  end

  assign cout = c[W];

endmodule
