// tb_quotient_assembler: feeds random digit sequences (with random gaps
// between digits) and checks that the binary quotient equals
// sum_j q_j * 2^(ITER-1-j) computed here, that done rises in the clock after
// the ITER-th digit with busy/run falling, that the last digit's remainder
// words are captured, and that digits arriving after done are ignored.
// Uses ITER = 20 (and N = 55) to keep runs short; also one run at ITER = 55.
`timescale 1ns/1ps
module tb_quotient_assembler;
  import srt_pkg::*;
  localparam int N = 55;

  logic clk = 0, rst_n = 0, start = 0, digit_evt = 0;
  qdigit_t digit = Q_EMPTY;
  logic [N-1:0] rsum_in = '0, rcar_in = '0;
  logic run_a, busy_a, done_a, run_b, busy_b, done_b;
  logic [20:0] q_a;
  logic [55:0] q_b;
  logic [N-1:0] rs_a, rc_a, rs_b, rc_b;
  int checks = 0, failures = 0;

  quotient_assembler #(.ITER(20)) dut_a (
    .clk, .rst_n, .start, .digit_evt, .digit, .rem_sum_in(rsum_in), .rem_car_in(rcar_in),
    .run(run_a), .busy(busy_a), .done(done_a), .quotient(q_a), .rem_sum(rs_a), .rem_car(rc_a));
  quotient_assembler dut_b (
    .clk, .rst_n, .start, .digit_evt, .digit, .rem_sum_in(rsum_in), .rem_car_in(rcar_in),
    .run(run_b), .busy(busy_b), .done(done_b), .quotient(q_b), .rem_sum(rs_b), .rem_car(rc_b));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint qa, qb;
    int v;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      check(busy_a && run_a && !done_a, "not busy after start");
      qa = 0; qb = 0;
      for (int j = 0; j < 55; j++) begin
        repeat ($urandom % 3) @(negedge clk);
        v = int'($urandom % 3) - 1;
        digit = (v == 1) ? Q_POS : ((v == -1) ? Q_NEG : Q_ZERO);
        rsum_in = N'({$urandom, $urandom}); rcar_in = N'({$urandom, $urandom});
        digit_evt = 1;
        if (j < 20) qa = qa * 2 + v;
        qb = qb * 2 + v;
        @(negedge clk);
        digit_evt = 0;
        if (j == 19) begin
          check(done_a && !busy_a && !run_a, "ITER=20: done not raised after 20 digits");
          check(q_a == 21'(qa), $sformatf("ITER=20: quotient %0d expected %0d", $signed(q_a), qa));
          check(rs_a == rsum_in && rc_a == rcar_in, "ITER=20: remainder not captured");
        end else if (j < 19) begin
          check(!done_a && busy_a, "ITER=20: done too early");
        end
      end
      check(done_b && q_b == 56'(qb), $sformatf("ITER=55: quotient %0d expected %0d", $signed(q_b), qb));
      check(done_a && q_a == 21'(qa), "ITER=20: digits after done changed the quotient");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
