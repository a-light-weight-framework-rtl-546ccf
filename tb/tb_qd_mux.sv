// tb_qd_mux: checks that addend + cin equals -q*d (mod 2^N) for every digit
// value, including the empty digit, over random divisors.
`timescale 1ns/1ps
module tb_qd_mux;
  import srt_pkg::*;
  localparam int N = 55;
  qdigit_t q;
  logic [N-1:0] d, addend;
  logic cin;
  int checks = 0, failures = 0;

  qd_mux dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    qdigit_t dig [4];
    int      val [4];
    dig = '{Q_POS, Q_ZERO, Q_NEG, Q_EMPTY};
    val = '{1, 0, -1, 0};
    for (int k = 0; k < 500; k++) begin
      d = {2'b00, 1'b1, 52'({$urandom, $urandom})};
      for (int j = 0; j < 4; j++) begin
        q = dig[j];
        #1;
        checks++;
        if (N'(addend + N'(cin)) != N'(-(val[j]) * $signed({1'b0, d}))) begin
          failures++; $display("FAIL: digit %0d d=%h", val[j], d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
