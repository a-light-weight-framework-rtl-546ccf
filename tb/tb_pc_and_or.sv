// tb_pc_and_or: takes the single-rail precharged AND-OR gate through
// precharge, evaluate and hold for all eight input combinations, with the
// high inputs rising one at a time in random order. Checks: low after
// precharge; high exactly when the inputs risen so far satisfy
// a AND (b OR c); the result held after the inputs return low.
`timescale 1ns/1ps
module tb_pc_and_or;
  logic pb = 0, a = 0, b = 0, c = 0;
  logic y;
  int checks = 0, failures = 0;

  pc_and_or dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] val, applied;
    bit yref;
    for (int rep = 0; rep < 40; rep++) begin
      for (int v = 0; v < 8; v++) begin
        val = 3'(v);
        pb = 0; {a, b, c} = '0;
        #1 check(!y, "output high in precharge");
        pb = 1;
        applied = '0;
        for (int step = 0; step < 3; step++) begin
          int s;
          s = int'($urandom % 3);
          while (applied[s]) s = (s + 1) % 3;
          applied[s] = 1'b1;
          {a, b, c} = val & applied;
          #1;
          yref = a & (b | c);
          check(y == yref, $sformatf("a=%0d b=%0d c=%0d after step %0d gives %0d", a, b, c, step, y));
        end
        yref = val[2] & (val[1] | val[0]);
        {a, b, c} = '0;
        #1 check(y == yref, "result not held");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
