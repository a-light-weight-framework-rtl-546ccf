// tb_csa: test of the carry-save adder.
// Random operands: checks sum + carry == x + y + z + cin (mod 2^N), that the
// sum word is the bitwise parity and that carry bit 0 is cin, on the default
// 55-bit width. Worked example on an 8-bit instance: accumulating
// 12 + 13 + 14 + 15 + 16 in carry-save form and resolving the two words once
// at the end gives 70, the same as ripple-carry addition.
`timescale 1ns/1ps
module tb_csa;
  localparam int N = 55;
  logic [N-1:0] x, y, z, sum, carry;
  logic cin;
  int checks = 0, failures = 0;

  csa dut (.*);

  logic [7:0] ax, ay, az, as_, ac;
  csa #(.N(8)) dut8 (.x(ax), .y(ay), .z(az), .cin(1'b0), .sum(as_), .carry(ac));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] ref_total;
    for (int k = 0; k < 2000; k++) begin
      x = N'({$urandom, $urandom}); y = N'({$urandom, $urandom});
      z = N'({$urandom, $urandom}); cin = 1'($urandom);
      if (k == 0) begin x = '1; y = '1; z = '1; cin = 1; end
      #1;
      ref_total = x + y + z + N'(cin);
      checks++;
      if (N'(sum + carry) != ref_total) begin failures++; $display("FAIL: total"); end
      checks++;
      if (sum != (x ^ y ^ z) || carry[0] != cin) begin failures++; $display("FAIL: word split"); end
    end
    // worked example: 12 + 13 + 14 + 15 + 16
    ax = 8'd12; ay = 8'd0;
    for (int v = 13; v <= 16; v++) begin
      az = 8'(v);
      #1;
      checks++;
      if (8'(as_ + ac) != 8'((v * (v + 1) - 11 * 12) / 2)) begin
        failures++; $display("FAIL: running carry-save total after adding %0d", v);
      end
      ax = as_; ay = ac;
    end
    checks++;
    if (8'(ax + ay) != 8'd70) begin failures++; $display("FAIL: worked example total"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
