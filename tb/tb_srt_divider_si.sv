// tb_srt_divider_si: the divider in speed-independent mode, where a stage
// waits for its successor's digit to be empty before evaluating instead of
// relying on precharge being faster than evaluation.
//
// Two dividers run the same operands: one with a 1-clock precharge and one
// with a 3-clock precharge, which would break the timed scheme (precharge
// no longer finishes before the next evaluation) but must not matter here.
// Checks, per division and divider: the quotient bound and exact remainder
// identity (as in the default test) and the clock count, one digit every
// Q_EVAL + max(2, PRECHARGE + 1) clocks. Every clock the ring state
// (pb and valid outputs of the three stages) must be one of the fifteen
// states of the speed-independent protocol; the bench reports how many of
// them each divider visited and fails if a divider never waited on a
// successor that was still precharging (the slow one must). The protocol
// lets two successive stages both be in hold mode (pb high, digit valid);
// the stage holding the current data is then the one whose successor is not
// in hold mode. Every clock exactly one stage must be that holder, each
// hand-over must satisfy r' = 2*(r - q*D) with |r'| <= 2*D, and a division
// must see one hand-over per digit; the double-hold case must occur.
`timescale 1ns/1ps
module tb_srt_divider_si;
  import srt_pkg::*;

  localparam int N = 55, ITER = 55, Q_EVAL = 2;
  localparam int PRE [2] = '{1, 3};
  localparam int NDIV = 400;

  logic clk = 0, rst_n = 0, start = 0;
  logic [N-3:0] dividend = '0, divisor = '0;
  logic [1:0] busy, done;
  logic [ITER:0] quotient [2];
  logic [N-1:0] rem_sum [2], rem_car [2];
  logic [2:0] pb [2], stage_valid [2];
  logic [1:0] g_y_t, g_y_f, g_y_empty, s_y;
  int checks = 0, failures = 0;

  srt_divider #(.PRECHARGE_CYCLES(1), .SPEED_INDEPENDENT(1'b1)) dut0 (
    .clk, .rst_n, .start, .dividend, .divisor, .busy(busy[0]), .done(done[0]),
    .quotient(quotient[0]), .rem_sum(rem_sum[0]), .rem_car(rem_car[0]),
    .pb(pb[0]), .stage_valid(stage_valid[0]),
    .g_pb(1'b0), .g_a_t(1'b0), .g_a_f(1'b0), .g_b_t(1'b0), .g_b_f(1'b0),
    .g_c_t(1'b0), .g_c_f(1'b0), .g_y_t(g_y_t[0]), .g_y_f(g_y_f[0]), .g_y_empty(g_y_empty[0]),
    .s_pb(1'b0), .s_a(1'b0), .s_b(1'b0), .s_c(1'b0), .s_y(s_y[0]));

  srt_divider #(.PRECHARGE_CYCLES(3), .SPEED_INDEPENDENT(1'b1)) dut1 (
    .clk, .rst_n, .start, .dividend, .divisor, .busy(busy[1]), .done(done[1]),
    .quotient(quotient[1]), .rem_sum(rem_sum[1]), .rem_car(rem_car[1]),
    .pb(pb[1]), .stage_valid(stage_valid[1]),
    .g_pb(1'b0), .g_a_t(1'b0), .g_a_f(1'b0), .g_b_t(1'b0), .g_b_f(1'b0),
    .g_c_t(1'b0), .g_c_f(1'b0), .g_y_t(g_y_t[1]), .g_y_f(g_y_f[1]), .g_y_empty(g_y_empty[1]),
    .s_pb(1'b0), .s_a(1'b0), .s_b(1'b0), .s_c(1'b0), .s_y(s_y[1]));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic int exp_cycles(int pre);
    int period;
    period = Q_EVAL + ((pre + 1 > 2) ? pre + 1 : 2);
    return Q_EVAL + (ITER - 1) * period + 1;
  endfunction

  initial begin
    repeat ((NDIV + 10) * (exp_cycles(3) + 10) + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
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

  // stage outputs, for the holder check
  logic [N-1:0] hs [2][3], hc [2][3];
  qdigit_t      hq [2][3];
  for (genvar i = 0; i < 3; i++) begin : g_tap
    assign hs[0][i] = dut0.g_stage[i].u_stage.r_out_sum_t;
    assign hc[0][i] = dut0.g_stage[i].u_stage.r_out_car_t;
    assign hq[0][i] = dut0.g_stage[i].u_stage.q_out;
    assign hs[1][i] = dut1.g_stage[i].u_stage.r_out_sum_t;
    assign hc[1][i] = dut1.g_stage[i].u_stage.r_out_car_t;
    assign hq[1][i] = dut1.g_stage[i].u_stage.q_out;
  end

  int holder [2] = '{-1, -1};
  int hand_overs [2];
  int double_hold = 0;
  logic signed [127:0] held_r [2];
  int held_q [2];

  always @(negedge clk) begin
    for (int k = 0; k < 2; k++) begin
      if (!running[k]) holder[k] = -1;
      else if (busy[k]) begin
        logic [2:0] hm, hd;
        logic signed [127:0] dd, r_new;
        logic [N-1:0] raw;
        hm = pb[k] & stage_valid[k];
        for (int i = 0; i < 3; i++) hd[i] = hm[i] && !hm[(i + 1) % 3];
        if ($countones(hm) == 2) double_hold++;
        dd = $signed({75'd0, divisor});
        check($countones(hd) == 1, $sformatf("divider %0d: %0d stages hold the current data",
                                             k, $countones(hd)));
        for (int i = 0; i < 3; i++) begin
          if (hd[i] && i != holder[k]) begin
            raw = hs[k][i] + hc[k][i];
            r_new = $signed({{73{raw[N-1]}}, raw});
            if (holder[k] >= 0) begin
              raw = N'(2 * (held_r[k] - held_q[k] * dd));
              hand_overs[k]++;
              check($signed({{73{raw[N-1]}}, raw}) == r_new && r_new <= 2 * dd && -r_new <= 2 * dd,
                    $sformatf("divider %0d: stage %0d remainder breaks the recurrence", k, i));
            end
            holder[k] = i;
            held_r[k] = r_new;
            held_q[k] = int'(hq[k][i].pos) - int'(hq[k][i].neg);
          end
        end
      end
    end
  end

  int seen [2][15];
  int waits [2];
  logic [1:0] running = '0;
  always @(negedge clk) begin
    for (int k = 0; k < 2; k++) begin
      if (running[k] && busy[k]) begin
        int id;
        id = si_state(pb[k], stage_valid[k]);
        check(id >= 0, $sformatf("divider %0d: ring state pb=%b valid=%b not in the protocol",
                                 k, pb[k], stage_valid[k]));
        if (id >= 0) seen[k][id]++;
        for (int i = 0; i < 3; i++)
          if (pb[k][i] && !stage_valid[k][i] && stage_valid[k][(i+1)%3]) waits[k]++;
      end
    end
  end

  task automatic divide(input logic [52:0] c, input logic [52:0] dv);
    int cyc [2];
    @(negedge clk);
    dividend = c; divisor = dv; start = 1;
    @(negedge clk);
    start = 0;
    running = 2'b11;
    hand_overs = '{0, 0};
    cyc = '{0, 0};
    while (done != 2'b11 && cyc[1] < 4 * exp_cycles(3)) begin
      for (int k = 0; k < 2; k++) if (!done[k]) cyc[k]++;
      @(negedge clk);
    end
    running = 2'b00;
    for (int k = 0; k < 2; k++) begin
      logic signed [127:0] lhs, w_fin, rsig;
      logic [N-1:0] rraw;
      int qlast;
      check(done[k], "done never rose");
      check(hand_overs[k] == ITER, $sformatf("divider %0d: %0d hand-overs, expected %0d",
                                             k, hand_overs[k], ITER));
      check(cyc[k] == exp_cycles(PRE[k]), $sformatf("divider %0d: %0d clocks, expected %0d",
                                                    k, cyc[k], exp_cycles(PRE[k])));
      lhs = ($signed({75'd0, c}) <<< ITER) - $signed({72'd0, quotient[k]}) * $signed({75'd0, dv});
      check(lhs <= $signed({75'd0, dv}) && -lhs <= $signed({75'd0, dv}),
            $sformatf("divider %0d: quotient out of bound C=%h D=%h", k, c, dv));
      rraw = rem_sum[k] + rem_car[k];
      rsig = $signed({{73{rraw[N-1]}}, rraw});
      qlast = (k == 0) ? int'(dut0.u_asm.plus_w[0]) - int'(dut0.u_asm.minus_w[0])
                       : int'(dut1.u_asm.plus_w[0]) - int'(dut1.u_asm.minus_w[0]);
      w_fin = rsig - qlast * $signed({75'd0, dv});
      check(w_fin == lhs, $sformatf("divider %0d: remainder identity C=%h D=%h", k, c, dv));
    end
  endtask

  initial begin
    logic [63:0] r64, c64, d64;
    repeat (3) @(negedge clk);
    rst_n = 1;
    divide(53'd177 << 45, 53'd241 << 45);
    divide(53'h1FFFFFFFFFFFFE, 53'h1FFFFFFFFFFFFF);
    for (int k = 0; k < NDIV; k++) begin
      r64 = {$urandom, $urandom};
      d64 = {11'd0, 1'b1, r64[51:0]};
      r64 = {$urandom, $urandom};
      c64 = r64 % d64;
      if (c64 == 0) c64 = 1;
      divide(c64[52:0], d64[52:0]);
    end
    for (int k = 0; k < 2; k++) begin
      int n;
      n = 0;
      foreach (seen[k][s]) if (seen[k][s] > 0) n++;
      $display("divider %0d (precharge %0d clocks): %0d of 15 protocol states visited, %0d wait cycles",
               k, PRE[k], n, waits[k]);
      check(n >= 9, $sformatf("divider %0d visited only %0d protocol states", k, n));
    end
    check(waits[1] > 0, "slow-precharge divider never waited for its successor");
    check(double_hold > 0, "two successive stages were never both in hold mode");
    $display("clocks with two stages in hold mode: %0d", double_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
