// tb_ripple_adder: exhaustive test of the 4-bit carry-ripple adder (the CRA
// width) and a random test at 56 bits (the final quotient converter width).
`timescale 1ns/1ps
module tb_ripple_adder;
  logic [3:0]  a4, b4, s4;
  logic        c4i, c4o;
  logic [55:0] a56, b56, s56;
  logic        c56i, c56o;
  int checks = 0, failures = 0;

  ripple_adder #(.W(4))  dut4  (.a(a4),  .b(b4),  .cin(c4i),  .sum(s4),  .cout(c4o));
  ripple_adder #(.W(56)) dut56 (.a(a56), .b(b56), .cin(c56i), .sum(s56), .cout(c56o));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {c4i, a4, b4} = 9'(i);
      #1;
      checks++;
      if ({c4o, s4} != 5'(a4) + 5'(b4) + 5'(c4i)) begin
        failures++; $display("FAIL: %0d+%0d+%0d", a4, b4, c4i);
      end
    end
    for (int k = 0; k < 1000; k++) begin
      a56 = 56'({$urandom, $urandom}); b56 = 56'({$urandom, $urandom}); c56i = 1'($urandom);
      #1;
      checks++;
      if ({c56o, s56} != 57'(a56) + 57'(b56) + 57'(c56i)) begin
        failures++; $display("FAIL: wide add");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
