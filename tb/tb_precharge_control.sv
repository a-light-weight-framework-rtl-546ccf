// tb_precharge_control: drives the ring controller with a simple model of
// three speed-independent stages and checks the controller's rules. In the
// model a stage's digit empties a random 0..2 clocks after its pb falls (0:
// at once). It becomes valid once pb has been high for a random 2..4 clocks
// and the successor's digit is empty. Checks:
//   * reset puts every stage into precharge, load gives pb = H L H,
//   * pb is never high on all three stages,
//   * stages finish evaluating strictly in ring order 0, 1, 2, 0, ...,
//   * a stage's pb only rises after its successor's pb has fallen, and
//     only falls while its successor holds a valid digit,
//   * every ring state (pb and digit-valid of the three stages) is one of the
//     fifteen states of the speed-independent protocol, and all fifteen occur,
//   * with run low no stage is enabled any more.
`timescale 1ns/1ps
module tb_precharge_control;
  logic clk = 0, rst_n = 0, load = 0, run = 0;
  logic [2:0] q_valid, pb;
  int checks = 0, failures = 0;

  precharge_control dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stage model
  int ev_left [3], pre_left [3];
  logic [2:0] q_reg = 3'b000;
  always_comb
    for (int i = 0; i < 3; i++) q_valid[i] = q_reg[i] && !(!pb[i] && pre_left[i] == 0);
  always @(posedge clk) begin
    for (int i = 0; i < 3; i++) begin
      if (!pb[i]) begin
        if (pre_left[i] <= 1) q_reg[i] <= 1'b0;
        else pre_left[i] <= pre_left[i] - 1;
        ev_left[i] <= 2 + int'($urandom % 3);
      end else begin
        pre_left[i] <= int'($urandom % 3);
        if (!q_reg[i]) begin
          if (ev_left[i] > 1) ev_left[i] <= ev_left[i] - 1;
          else if (!q_valid[(i+1)%3]) q_reg[i] <= 1'b1;
        end
      end
    end
  end

  // the fifteen states of the speed-independent protocol,
  // {pb(0),pb(1),pb(2)} and {V(0),V(1),V(2)}
  function automatic int si_state(logic [2:0] p, logic [2:0] v);
    case ({p[0], p[1], p[2], v[0], v[1], v[2]})
      6'b101_101: return 0;   6'b100_101: return 1;   6'b110_101: return 2;
      6'b100_100: return 3;   6'b110_100: return 4;   6'b110_110: return 5;
      6'b010_110: return 6;   6'b011_110: return 7;   6'b010_010: return 8;
      6'b011_010: return 9;   6'b011_011: return 10;  6'b001_011: return 11;
      6'b101_011: return 12;  6'b001_001: return 13;  6'b101_001: return 14;
      default:    return -1;
    endcase
  endfunction
  int seen [15];

  int expect_next = 0, evals = 0;
  logic [2:0] pb_d, qv_d;
  bit mon = 0;
  always @(negedge clk) begin
    if (mon) begin
      check(pb != 3'b111, "all three stages evaluating/holding");
      if (run) begin
        int id;
        id = si_state(pb, q_valid);
        check(id >= 0, $sformatf("ring state pb=%b valid=%b not in the protocol", pb, q_valid));
        if (id >= 0) seen[id]++;
      end
      for (int i = 0; i < 3; i++) begin
        if (q_valid[i] && !qv_d[i]) begin
          check(i == expect_next, $sformatf("stage %0d finished out of order", i));
          expect_next = (i + 1) % 3;
          evals++;
        end
        if (pb[i] && !pb_d[i])
          check(!pb_d[(i+1)%3], $sformatf("pb(%0d) rose while successor not precharging", i));
        if (!pb[i] && pb_d[i])
          check(pb_d[(i+1)%3] && qv_d[(i+1)%3], $sformatf("pb(%0d) fell early", i));
      end
    end
    pb_d <= pb;
    qv_d <= q_valid;
  end

  initial begin
    repeat (2) @(negedge clk);
    check(pb == 3'b000, "reset state is not all-precharge");
    rst_n = 1;
    @(negedge clk);
    check(pb == 3'b000, "stage enabled without load/run");
    // as in the divider, stage 2 holds the loaded operand
    load = 1; run = 1;
    @(negedge clk);
    load = 0;
    check(pb == 3'b101, "load pattern is not H L H");
    q_reg[2] = 1'b1;
    @(negedge clk);
    mon = 1;
    repeat (2000) @(negedge clk);
    check(evals > 200, $sformatf("only %0d evaluations", evals));
    foreach (seen[k]) check(seen[k] > 0, $sformatf("protocol state %0d never reached", k));
    $display("protocol states: %p", seen);
    // stop: after run falls at most the evaluation in flight finishes
    run = 0;
    repeat (20) @(negedge clk);
    begin
      int e0;
      e0 = evals;
      repeat (50) @(negedge clk);
      check(evals == e0, "evaluations continued with run low");
    end
    $display("evaluations: %0d", evals);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
