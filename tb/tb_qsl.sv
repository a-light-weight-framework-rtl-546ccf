// tb_qsl: exhaustive test of the quotient select logic.
//
// For every 4-bit CRA sum s (weights -2, 1, 1/2, 1/4) the remainder w can be
// anywhere in [s, s + 1/2). This bench works out, from that interval alone,
// whether s can occur under |w| <= d < 1, and if so checks that the chosen
// digit q keeps |2w - q*d| <= d for every such w and every divisor
// 1/2 <= d < 1 (on a grid of quarters and sixteenths). Codes that cannot
// occur must raise "unreachable".
`timescale 1ns/1ps
module tb_qsl;
  import srt_pkg::*;

  logic [3:0] cra_sum;
  qdigit_t    q;
  logic       unreachable;
  int checks = 0, failures = 0;

  qsl dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int code = 0; code < 16; code++) begin
      real s, w, d;
      int  qi;
      bit  reach;
      cra_sum = 4'(code);
      #1;
      s = (code >= 8) ? (code - 16) / 4.0 : code / 4.0;
      // reachable if [s, s+1/2) meets (-1, 1)
      reach = (s + 0.5 > -1.0) && (s < 1.0);
      checks++;
      if (unreachable == reach) begin
        failures++;
        $display("FAIL: code %b unreachable=%b", cra_sum, unreachable);
      end
      checks++;
      if (!q_legal(q) || !q_valid(q)) begin
        failures++;
        $display("FAIL: code %b digit not one-hot", cra_sum);
      end
      qi = q.pos ? 1 : (q.neg ? -1 : 0);
      if (reach) begin
        for (int di = 0; di < 8; di++) begin
          d = 0.5 + di / 16.0;
          for (int wi = 0; wi < 32; wi++) begin
            w = s + wi / 64.0;
            if (w > d || w < -d) continue;
            checks++;
            if ((2.0 * w - qi * d) > d || (2.0 * w - qi * d) < -d) begin
              failures++;
              $display("FAIL: code %b w=%f d=%f q=%0d breaks |w|<=d", cra_sum, w, d, qi);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
