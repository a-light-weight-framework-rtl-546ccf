// tb_srt_divider_example: the worked 177/241 division on a small divider
// (11-bit remainders, 12 quotient digits), checked digit by digit.
//
// The divisor is 241/256 and the dividend 177/512, so the remainder sequence
// is the textbook one: 177, then 2*(177 - 241) = -128, then
// 2*(-128 + 241) = 226, and so on, each digit chosen from the doubled
// remainder. The expected digits are +1 -1 +1 0 0 0 -1 0 +1 -1 -1 -1 and the
// carry-ripple sums the selection sees are 0001 1110 0001 1111 1111 1111 1110
// 1111 0000 1100 1011 1100; the last three show the table's -1 entries,
// including 1011, which only pending carries make possible. The bench checks
// both sequences, the +1 and -1 digit words (101000001000 and 010000100111),
// the binary quotient 1505 (0.010111100001), the exact remainder identity
// and the latency of Q_EVAL + 11*(Q_EVAL + 2) + 1 clocks. It divides
// twice, to check that a second start gives the same result.
`timescale 1ns/1ps
module tb_srt_divider_example;
  import srt_pkg::*;

  localparam int N = 11, ITER = 12, Q_EVAL = 2;
  localparam int EXP_CYCLES = Q_EVAL + (ITER - 1) * (Q_EVAL + 2) + 1;
  localparam logic [ITER-1:0] EXP_PLUS  = 12'b101000001000;
  localparam logic [ITER-1:0] EXP_MINUS = 12'b010000100111;
  localparam logic [4*ITER-1:0] EXP_CRA = {4'b0001, 4'b1110, 4'b0001, 4'b1111,
                                           4'b1111, 4'b1111, 4'b1110, 4'b1111,
                                           4'b0000, 4'b1100, 4'b1011, 4'b1100};

  logic clk = 0, rst_n = 0, start = 0;
  logic [N-3:0] dividend = 9'd177, divisor = 9'd482;
  logic busy, done;
  logic [ITER:0] quotient;
  logic [N-1:0] rem_sum, rem_car;
  logic [2:0] pb, stage_valid;
  logic g_y_t, g_y_f, g_y_empty, s_y;

  srt_divider #(.N(N), .ITER(ITER)) dut (
    .clk, .rst_n, .start, .dividend, .divisor, .busy, .done, .quotient,
    .rem_sum, .rem_car, .pb, .stage_valid,
    .g_pb(1'b0), .g_a_t(1'b0), .g_a_f(1'b0), .g_b_t(1'b0), .g_b_f(1'b0),
    .g_c_t(1'b0), .g_c_f(1'b0), .g_y_t, .g_y_f, .g_y_empty,
    .s_pb(1'b0), .s_a(1'b0), .s_b(1'b0), .s_c(1'b0), .s_y);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20 * EXP_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // record each digit and the carry-ripple sum it was chosen from
  logic [3:0] cra [3];
  assign cra[0] = dut.g_stage[0].u_stage.cra_sum;
  assign cra[1] = dut.g_stage[1].u_stage.cra_sum;
  assign cra[2] = dut.g_stage[2].u_stage.cra_sum;

  int n_dig = 0;
  logic [ITER-1:0] got_plus, got_minus;
  logic [4*ITER-1:0] got_cra;
  always @(negedge clk) begin
    for (int i = 0; i < 3; i++) begin
      if (dut.evt[i] && n_dig < ITER) begin
        got_plus  = {got_plus[ITER-2:0], dut.digit.pos};
        got_minus = {got_minus[ITER-2:0], dut.digit.neg};
        got_cra   = {got_cra[4*ITER-5:0], cra[i]};
        n_dig++;
      end
    end
  end

  task automatic divide_once();
    int cyc;
    logic signed [63:0] lhs, w_fin;
    logic [N-1:0] rraw;
    int qlast;
    n_dig = 0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 0;  // clock edges after the load edge
    while (!done && cyc < 4 * EXP_CYCLES) begin
      @(negedge clk);
      cyc++;
    end
    check(done, "done never rose");
    check(cyc == EXP_CYCLES, $sformatf("latency %0d clocks, expected %0d", cyc, EXP_CYCLES));
    check(n_dig == ITER, $sformatf("%0d digits, expected %0d", n_dig, ITER));
    check(got_plus == EXP_PLUS, $sformatf("+1 digits %b, expected %b", got_plus, EXP_PLUS));
    check(got_minus == EXP_MINUS, $sformatf("-1 digits %b, expected %b", got_minus, EXP_MINUS));
    for (int k = 0; k < ITER; k++)
      check(got_cra[4*(ITER-1-k) +: 4] == EXP_CRA[4*(ITER-1-k) +: 4],
            $sformatf("digit %0d: CRA sum %b, expected %b", k,
                      got_cra[4*(ITER-1-k) +: 4], EXP_CRA[4*(ITER-1-k) +: 4]));
    check(quotient == 13'd1505, $sformatf("quotient %0d, expected 1505", quotient));
    check(dut.u_asm.plus_w == EXP_PLUS && dut.u_asm.minus_w == EXP_MINUS,
          "assembler digit words differ from the digits produced");
    // C*2^12 - Q*D equals the last remainder (rem_sum + rem_car) - q_last*D
    lhs = (64'sd177 <<< ITER) - 64'(quotient) * 64'sd482;
    rraw = rem_sum + rem_car;
    qlast = int'(dut.u_asm.plus_w[0]) - int'(dut.u_asm.minus_w[0]);
    w_fin = $signed({{(64 - N){rraw[N-1]}}, rraw}) - qlast * 64'sd482;
    check(w_fin == lhs, $sformatf("remainder identity: %0d vs %0d", w_fin, lhs));
    check(lhs <= 482 && -lhs <= 482, "quotient not within one unit");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    divide_once();
    repeat (5) @(negedge clk);
    divide_once();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
