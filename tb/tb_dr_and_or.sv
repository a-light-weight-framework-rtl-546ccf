// tb_dr_and_or: takes the precharged dual-rail AND-OR gate through
// precharge, evaluate and hold for all eight input combinations, with the
// inputs arriving one at a time in random order. Checks: empty while
// precharging; stays empty until the function is decided; exactly one rail
// high with y = a AND (b OR c) after all inputs arrive; result held when
// inputs return to empty; empty again on the next precharge.
`timescale 1ns/1ps
module tb_dr_and_or;
  logic pb = 0, a_t = 0, a_f = 0, b_t = 0, b_f = 0, c_t = 0, c_f = 0;
  logic y_t, y_f, y_empty;
  int checks = 0, failures = 0;

  dr_and_or dut (.*);

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
    bit a, b, c, y;
    for (int rep = 0; rep < 40; rep++) begin
      for (int v = 0; v < 8; v++) begin
        {a, b, c} = 3'(v);
        y = a & (b | c);
        pb = 0; {a_t, a_f, b_t, b_f, c_t, c_f} = '0;
        #1 check(y_empty && !y_t && !y_f, "not empty in precharge");
        pb = 1;
        #1 check(y_empty, "left empty without inputs");
        // inputs arrive one by one in a random order
        for (int step = 0; step < 3; step++) begin
          int which;
          which = (int'($urandom % 3) + step + rep) % 3;
          // find the next not-yet-applied input
          for (int t = 0; t < 3; t++) begin
            int s;
            s = (which + t) % 3;
            if (s == 0 && !(a_t | a_f)) begin a_t = a; a_f = !a; break; end
            if (s == 1 && !(b_t | b_f)) begin b_t = b; b_f = !b; break; end
            if (s == 2 && !(c_t | c_f)) begin c_t = c; c_f = !c; break; end
          end
          #1;
          check(!(y_t && y_f), "both rails high");
          // a rail rises exactly when the inputs so far decide its value
          check(y_t == (a_t & (b_t | c_t)) && y_f == (a_f | (b_f & c_f)),
                "rail rose before the function was decided, or failed to rise");
        end
        check(!y_empty && y_t == y && y_f == !y, $sformatf("a=%0d b=%0d c=%0d gives y_t=%0d y_f=%0d",
                                                            a, b, c, y_t, y_f));
        {a_t, a_f, b_t, b_f, c_t, c_f} = '0;
        #1 check(!y_empty && y_t == y, "result not held");
      end
    end
    pb = 0;
    #1 check(y_empty, "not empty after final precharge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
