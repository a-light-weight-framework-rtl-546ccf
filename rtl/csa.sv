// csa: N-bit carry-save (3:2) adder.
//
// Each bit position is an independent full adder: it adds x[i], y[i] and z[i]
// and produces a sum bit at position i and a carry bit that belongs to
// position i+1. No carry travels along the word, so the delay does not depend
// on N; that is what lets every SRT iteration take constant time. The result
// is left in redundant form, as a sum word and a carry word whose arithmetic
// total is the value.
//
// The carry word is returned aligned to the sum word: carry[i] has the same
// weight as sum[i]. Position 0 of the carry word is free and takes cin, which
// the divider uses for the "+1" of a two's complement subtraction. The carry
// out of position N-1 is dropped: arithmetic is modulo 2^N, as in the divider
// description, which relies on the true remainder always fitting in N bits.
//
// Interface: combinational. sum + carry == x + y + z + cin (mod 2^N).
module csa #(
  parameter int unsigned N = 55
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic [N-1:0] z,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic [N-1:0] carry
);

  logic [N-1:0] maj;

  always_comb begin
    sum   = x ^ y ^ z;
    maj   = (x & y) | (x & z) | (y & z);
    carry = {maj[N-2:0], cin};
  end

endmodule
