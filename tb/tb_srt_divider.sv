// tb_srt_divider: end-to-end test of the self-timed SRT divider at its
// default size (55-bit remainders, 55 quotient digits, timed control).
//
// Divides a fixed set of corner operands and many random normalised
// mantissa pairs (1/2 <= D < 1, 0 < C < D). For each division it checks,
// against 128-bit integer arithmetic done here:
//   * |C*2^55 - Q*D| <= D   (the quotient is within one unit of C/D*2^55),
//   * C*2^55 - Q*D equals the final SRT remainder rebuilt from the returned
//     carry-save remainder and the last digit (exact identity),
//   * the number of clocks from start to done: one digit every
//     Q_EVAL + 2 clocks.
// Every clock it checks that the ring's control state (pb and which stages
// hold valid outputs) is one of the states of the timed protocol, and that
// exactly one stage holds the current data: it is in hold mode (pb high,
// digit valid) and its successor is not. Each time that role passes to the
// next stage, the new stage's remainder r' and digit q' are checked against
// the previous holder's r and q: r' = 2*(r - q*D) exactly, and |r'| <= 2*D
// (the SRT bound |w| <= D on w = r'/2). It
// counts how often each mechanism happens: each of the nine control states,
// each quotient digit value, each CRA code of the selection table, the
// remainder settling before the digit, and a stage being enabled to
// evaluate while its successor is still precharging. A mechanism never seen
// counts as a failure. The example dual-rail gate on the g_* ports and the
// single-rail gate on the s_* ports are each taken through precharge,
// evaluate and hold once.
`timescale 1ns/1ps
module tb_srt_divider;
  import srt_pkg::*;

  localparam int N = 55, ITER = 55, Q_EVAL = 2;
  localparam int EXP_CYCLES = Q_EVAL + (ITER - 1) * (Q_EVAL + 2) + 1;
  localparam int NRAND = 1500;
  // hand-overs of the current data: one per evaluation, starting from the
  // stage loaded with the dividend
  localparam int HOLD_STEPS = ITER;

  logic clk = 0, rst_n = 0, start = 0;
  logic [N-3:0] dividend = '0, divisor = '0;
  logic busy, done;
  logic [ITER:0] quotient;
  logic [N-1:0] rem_sum, rem_car;
  logic [2:0] pb, stage_valid;
  logic g_pb = 0, g_a_t = 0, g_a_f = 0, g_b_t = 0, g_b_f = 0, g_c_t = 0, g_c_f = 0;
  logic g_y_t, g_y_f, g_y_empty;
  logic s_pb = 0, s_a = 0, s_b = 0, s_c = 0;
  logic s_y;

  srt_divider dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat ((NRAND + 50) * (EXP_CYCLES + 10) + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- protocol monitor ----------------
  // state code: {pb(0),pb(1),pb(2)} then {V(0),V(1),V(2)}, '?' = either.
  // The nine states of the timed protocol:
  //   HLL/VEV  HHL/VE?  HHL/VVE  LHL/VVE  LHH/?VE  LHH/EVV  LLH/EVV
  //   HLH/E?V  HLH/VEV
  function automatic int state_id(logic [2:0] p, logic [2:0] v);
    // p and v indexed by stage number
    logic [5:0] s;
    s = {p[0], p[1], p[2], v[0], v[1], v[2]};
    casez (s)
      6'b100_101: return 0;
      6'b110_10?: return 1;
      6'b110_110: return 2;
      6'b010_110: return 3;
      6'b011_?10: return 4;
      6'b011_011: return 5;
      6'b001_011: return 6;
      6'b101_0?1: return 7;
      6'b101_101: return 8;
      default:    return -1;
    endcase
  endfunction

  int state_seen [9];
  int illegal_states = 0;
  int digit_seen [3];          // +1, 0, -1
  int cra_seen [16];
  int r_before_q = 0;          // remainder valid while digit still empty
  int early_enable = 0;        // pb rose while successor still held data
  logic [2:0] pb_d, sv_d;
  logic running = 0;

  // reach into the stages for coverage only
  logic [3:0] cra [3];
  logic       rvalid [3];
  assign cra[0] = dut.g_stage[0].u_stage.cra_sum;
  assign cra[1] = dut.g_stage[1].u_stage.cra_sum;
  assign cra[2] = dut.g_stage[2].u_stage.cra_sum;
  assign rvalid[0] = &(dut.g_stage[0].u_stage.r_out_sum_t ^ dut.g_stage[0].u_stage.r_out_sum_f);
  assign rvalid[1] = &(dut.g_stage[1].u_stage.r_out_sum_t ^ dut.g_stage[1].u_stage.r_out_sum_f);
  assign rvalid[2] = &(dut.g_stage[2].u_stage.r_out_sum_t ^ dut.g_stage[2].u_stage.r_out_sum_f);

  // current data of each stage, for the hold-mode refinement check
  logic [N-1:0] hs [3], hc [3];
  qdigit_t      hq [3];
  assign hs[0] = dut.g_stage[0].u_stage.r_out_sum_t;
  assign hs[1] = dut.g_stage[1].u_stage.r_out_sum_t;
  assign hs[2] = dut.g_stage[2].u_stage.r_out_sum_t;
  assign hc[0] = dut.g_stage[0].u_stage.r_out_car_t;
  assign hc[1] = dut.g_stage[1].u_stage.r_out_car_t;
  assign hc[2] = dut.g_stage[2].u_stage.r_out_car_t;
  assign hq[0] = dut.g_stage[0].u_stage.q_out;
  assign hq[1] = dut.g_stage[1].u_stage.q_out;
  assign hq[2] = dut.g_stage[2].u_stage.q_out;

  int holder = -1;             // stage holding the current data, -1 = none yet
  int hold_steps = 0;          // hand-overs seen in the current division
  int refine_fail = 0;
  logic signed [127:0] held_r;
  int held_q;

  function automatic logic signed [127:0] sval(input logic [N-1:0] w);
    return $signed({{(128 - N){w[N-1]}}, w});
  endfunction

  always @(negedge clk) begin
    if (!running) begin
      holder = -1;
    end else if (busy) begin
      logic [2:0] hm, hd;
      logic signed [127:0] dd, r_new;
      int q_new;
      hm = pb & stage_valid;
      for (int i = 0; i < 3; i++) hd[i] = hm[i] && !hm[(i + 1) % 3];
      dd = $signed({75'd0, divisor});
      if ($countones(hd) != 1) begin
        refine_fail++;
        if (refine_fail < 5) $display("FAIL: %0d stages hold the current data", $countones(hd));
      end else begin
        for (int i = 0; i < 3; i++) begin
          if (hd[i] && i != holder) begin
            r_new = sval(hs[i] + hc[i]);
            q_new = int'(hq[i].pos) - int'(hq[i].neg);
            if (holder >= 0) begin
              hold_steps++;
              if (sval(N'(2 * (held_r - held_q * dd))) != r_new ||
                  r_new > 2 * dd || -r_new > 2 * dd) begin
                refine_fail++;
                if (refine_fail < 5) $display("FAIL: stage %0d remainder breaks the recurrence", i);
              end
            end
            holder = i;
            held_r = r_new;
            held_q = q_new;
          end
        end
      end
    end
  end

  always @(negedge clk) begin
    if (running && busy) begin
      int id;
      id = state_id(pb, stage_valid);
      if (id < 0) begin
        illegal_states++;
        if (illegal_states < 5)
          $display("FAIL: illegal ring state pb=%b valid=%b", pb, stage_valid);
      end else state_seen[id]++;
      for (int i = 0; i < 3; i++) begin
        if (pb[i] && !pb_d[i] && sv_d[(i+1)%3]) early_enable++;
        if (rvalid[i] && !stage_valid[i]) r_before_q++;
        if (dut.evt[i]) begin
          cra_seen[cra[i]]++;
          if (dut.digit.pos) digit_seen[0]++;
          if (dut.digit.zero) digit_seen[1]++;
          if (dut.digit.neg) digit_seen[2]++;
        end
      end
    end
    pb_d <= pb;
    sv_d <= stage_valid;
  end

  // ---------------- one division ----------------
  task automatic divide(input logic [52:0] c, input logic [52:0] dv);
    logic signed [127:0] lhs, w_fin, rsig;
    logic [N-1:0] rraw;
    int cyc, qlast;
    @(negedge clk);
    dividend = c; divisor = dv; start = 1;
    @(negedge clk);
    start = 0;
    running = 1;
    hold_steps = 0;
    cyc = 0;  // clock edges after the load edge
    while (!done && cyc < 4 * EXP_CYCLES) begin
      @(negedge clk);
      cyc++;
    end
    running = 0;
    check(done, "done never rose");
    check(hold_steps == HOLD_STEPS, $sformatf("%0d hand-overs of the current data, expected %0d",
                                              hold_steps, HOLD_STEPS));
    check(cyc == EXP_CYCLES, $sformatf("cycle count %0d, expected %0d", cyc, EXP_CYCLES));
    // C*2^ITER - Q*D
    lhs = ($signed({75'd0, c}) <<< ITER) - $signed({72'd0, quotient}) * $signed({75'd0, dv});
    check(lhs <= $signed({75'd0, dv}) && -lhs <= $signed({75'd0, dv}),
          $sformatf("quotient out of bound: C=%h D=%h Q=%h", c, dv, quotient));
    // final remainder: (rem_sum + rem_car) - q_last * D
    rraw = rem_sum + rem_car;
    rsig = $signed({{73{rraw[N-1]}}, rraw});
    qlast = int'(dut.u_asm.plus_w[0]) - int'(dut.u_asm.minus_w[0]);
    w_fin = rsig - qlast * $signed({75'd0, dv});
    check(w_fin == lhs, $sformatf("remainder identity: C=%h D=%h lhs=%0d w=%0d", c, dv, lhs, w_fin));
  endtask

  initial begin
    logic [63:0] r64, c64, d64;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // the example gate: precharge, evaluate a=1 b=0 c=1, hold, precharge
    @(negedge clk); g_pb = 0;
    #1 check(g_y_empty && !g_y_t && !g_y_f, "gate: empty while precharging");
    g_pb = 1; g_a_t = 1; g_b_f = 1; g_c_t = 1;
    #1 check(g_y_t && !g_y_f && !g_y_empty, "gate: evaluates a AND (b OR c) = 1");
    g_a_t = 0; g_b_f = 0; g_c_t = 0;
    #1 check(g_y_t && !g_y_f, "gate: holds result");
    g_pb = 0;
    #1 check(g_y_empty, "gate: precharged again");
    // the single-rail gate: precharge, evaluate a=1 b=1 c=0, hold, precharge
    s_pb = 0;
    #1 check(!s_y, "single-rail gate: low while precharging");
    s_pb = 1; s_a = 1;
    #1 check(!s_y, "single-rail gate: rose before b or c");
    s_b = 1;
    #1 check(s_y, "single-rail gate: evaluates a AND (b OR c) = 1");
    s_a = 0; s_b = 0;
    #1 check(s_y, "single-rail gate: holds result");
    s_pb = 0;
    #1 check(!s_y, "single-rail gate: precharged again");

    // corner operands
    divide(53'h1 << 52, 53'h1 << 52 | 53'h1);         // C just below D
    divide(53'd177 << 45, 53'd241 << 45);             // 177/241
    divide(53'd1, 53'h1 << 52);                       // tiny dividend
    divide(53'h1FFFFFFFFFFFFE, 53'h1FFFFFFFFFFFFF);   // C = D - 1 at the top
    divide(53'h10000000000000, 53'h1FFFFFFFFFFFFF);   // C = 1/2, D ~ 1
    divide(53'h15555555555555, 53'h18000000000000);
    for (int k = 0; k < NRAND; k++) begin
      r64 = {$urandom, $urandom};
      d64 = {11'd0, 1'b1, r64[51:0]};
      r64 = {$urandom, $urandom};
      c64 = r64 % d64;
      if (c64 == 0) c64 = 1;
      divide(c64[52:0], d64[52:0]);
    end

    // mechanism coverage
    check(illegal_states == 0, $sformatf("%0d illegal ring states", illegal_states));
    for (int i = 0; i < 9; i++)
      check(state_seen[i] > 0, $sformatf("ring state %0d never visited", i));
    for (int i = 0; i < 3; i++)
      check(digit_seen[i] > 0, $sformatf("digit class %0d never produced", i));
    foreach (cra_seen[i]) begin
      if (i inside {[4:10]}) check(cra_seen[i] == 0, $sformatf("unreachable CRA code %0d seen", i));
      else check(cra_seen[i] > 0, $sformatf("CRA code %0d never seen", i));
    end
    check(r_before_q > 0, "remainder never settled ahead of the digit");
    check(early_enable > 0, "no stage was enabled while its successor still held data");
    check(refine_fail == 0, $sformatf("%0d hold-mode refinement violations", refine_fail));
    $display("states: %p  digits(+1,0,-1): %p  cra: %p", state_seen, digit_seen, cra_seen);
    $display("remainder-before-digit cycles %0d, early enables %0d", r_before_q, early_enable);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
