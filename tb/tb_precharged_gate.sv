// tb_precharged_gate: checks the three phases of the generic precharged
// gate. Random sequences of precharge and evaluate phases are applied, with
// pull-down pulses of random length in the evaluate phase. A reference
// model written here tracks the expected output: low after precharge, high
// from the first pull-down pulse of an evaluate phase until the next
// precharge, and low if no pulse came. Each step is checked against it.
// Directed steps check that the output stays high when the pull-down network
// turns off again (hold) and that precharge wins over a conducting network.
`timescale 1ns/1ps
module tb_precharged_gate;
  logic pb = 0, pull_down = 0;
  logic y;
  int checks = 0, failures = 0;

  precharged_gate dut (.*);

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
    bit expect_y;
    // directed: precharge, evaluate with no pull-down, pull-down pulse, hold
    pb = 0; pull_down = 0;
    #1 check(!y, "output high in precharge");
    pb = 1;
    #1 check(!y, "output rose without pull-down");
    pull_down = 1;
    #1 check(y, "output did not rise on pull-down");
    pull_down = 0;
    #1 check(y, "output not held after the network turned off");
    #5 check(y, "output lost in hold");
    pb = 0;
    #1 check(!y, "output not cleared by precharge");
    // random phases
    expect_y = 0;
    for (int k = 0; k < 500; k++) begin
      pb = 0; pull_down = 0; expect_y = 0;
      #1 check(y == expect_y, "precharge");
      pb = 1;
      for (int s = 0; s < 4; s++) begin
        pull_down = 1'($urandom % 3 == 0);
        if (pull_down) expect_y = 1;
        #1 check(y == expect_y, $sformatf("evaluate step %0d", s));
        pull_down = 0;
        #1 check(y == expect_y, $sformatf("hold after step %0d", s));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
