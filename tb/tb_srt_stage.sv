// tb_srt_stage: tests one divider stage through its precharge, evaluate and
// hold phases.
//
// Two stages run side by side on the same inputs: "tm" with the default
// timed settings and "si" in speed-independent mode with a slow precharge
// (3 clocks). For random divisors d, remainders w with |w| <= d and
// previous digits q, the predecessor's outputs are built as a random
// carry-save split of r = w + q*d. The bench then checks:
//   * precharge empties every output after PRECHARGE_CYCLES clocks,
//   * after pb rises the remainder is valid after 1 clock and the digit
//     after 2 (eval_done pulses with it), in that order,
//   * remainder sum + carry == 2*(r - q*d) (mod 2^N), false rails are the
//     inverse of true rails,
//   * the digit keeps the next remainder bounded: |2w - q'*d| <= d,
//   * outputs hold while the inputs change,
//   * the timed stage ignores its successor, the speed-independent one waits
//     until the successor's digit is empty,
//   * load sets the outputs directly.
`timescale 1ns/1ps
module tb_srt_stage;
  import srt_pkg::*;
  localparam int N = 55;

  logic clk = 0, rst_n = 0, pb = 0, next_empty = 0, load = 0;
  logic [N-1:0] d = '0, rs_t = '0, rs_f = '0, rc_t = '0, rc_f = '0;
  qdigit_t q_in = Q_EMPTY, load_q = Q_EMPTY;
  logic [N-1:0] load_sum = '0, load_car = '0;

  qdigit_t      tm_q, si_q;
  logic [N-1:0] tm_st, tm_sf, tm_ct, tm_cf, si_st, si_sf, si_ct, si_cf;
  logic         tm_done, si_done;

  srt_stage dut_tm (
    .clk, .rst_n, .pb, .d, .q_in, .r_in_sum_t(rs_t), .r_in_sum_f(rs_f),
    .r_in_car_t(rc_t), .r_in_car_f(rc_f), .next_empty, .load, .load_q,
    .load_sum, .load_car, .q_out(tm_q), .r_out_sum_t(tm_st), .r_out_sum_f(tm_sf),
    .r_out_car_t(tm_ct), .r_out_car_f(tm_cf), .eval_done(tm_done));

  srt_stage #(.PRECHARGE_CYCLES(3), .SPEED_INDEPENDENT(1'b1)) dut_si (
    .clk, .rst_n, .pb, .d, .q_in, .r_in_sum_t(rs_t), .r_in_sum_f(rs_f),
    .r_in_car_t(rc_t), .r_in_car_f(rc_f), .next_empty, .load, .load_q,
    .load_sum, .load_car, .q_out(si_q), .r_out_sum_t(si_st), .r_out_sum_f(si_sf),
    .r_out_car_t(si_ct), .r_out_car_f(si_cf), .eval_done(si_done));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
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

  function automatic bit all_empty(qdigit_t q, logic [N-1:0] a, b, c, e);
    return !q_valid(q) && a == 0 && b == 0 && c == 0 && e == 0;
  endfunction

  function automatic bit r_valid(logic [N-1:0] a, b, c, e);
    return (&(a ^ b)) && (&(c ^ e));
  endfunction

  function automatic int digit_val(qdigit_t q);
    return q.pos ? 1 : (q.neg ? -1 : 0);
  endfunction

  // check a stage's evaluated outputs against w = r - q*d
  task automatic check_result(input string who, input qdigit_t qo,
                              input logic [N-1:0] st, sf, ct, cf,
                              input longint w, input longint dd);
    logic [N-1:0] tot;
    longint nw;
    tot = st + ct;
    check(tot == N'(2 * w), {who, ": remainder is not 2w"});
    check(sf == ~st && cf == ~ct, {who, ": false rails"});
    check(q_valid(qo) && q_legal(qo), {who, ": digit not one-hot"});
    nw = 2 * w - digit_val(qo) * dd;
    check(nw <= dd && -nw <= dd, $sformatf("%s: digit %0d breaks bound, w=%0d d=%0d",
                                           who, digit_val(qo), w, dd));
  endtask

  initial begin
    longint dd, w, r;
    int qv;
    logic [N-1:0] car;
    qdigit_t qsel;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      // ---- precharge ----
      @(negedge clk);
      pb = 0; next_empty = 0;
      @(negedge clk);
      check(all_empty(tm_q, tm_st, tm_sf, tm_ct, tm_cf), "tm: not empty 1 clock into precharge");
      if (k > 0) check(q_valid(si_q), "si: emptied before its 3-clock precharge");
      repeat (2) @(negedge clk);
      check(all_empty(si_q, si_st, si_sf, si_ct, si_cf), "si: not empty after precharge");
      // ---- operands ----
      dd = longint'({1'b1, 52'({$urandom, $urandom})});
      w  = longint'({$urandom, $urandom}) % (2 * dd + 1);
      if (w < 0) w = -w;
      w  = w - dd;
      if (k == 0) w = dd;
      if (k == 1) w = -dd;
      qv = int'($urandom % 3) - 1;
      qsel = (qv == 1) ? Q_POS : ((qv == -1) ? Q_NEG : Q_ZERO);
      r   = w + qv * dd;
      car = N'({$urandom, $urandom}) & ~N'(1) | N'($urandom % 2);
      d = N'(dd); q_in = qsel;
      rs_t = N'(r) - car; rs_f = ~(N'(r) - car);
      rc_t = car; rc_f = ~car;
      // ---- evaluate ----
      pb = 1;
      @(negedge clk);
      check(r_valid(tm_st, tm_sf, tm_ct, tm_cf) && !q_valid(tm_q),
            "tm: remainder not valid ahead of the digit");
      check(all_empty(si_q, si_st, si_sf, si_ct, si_cf), "si: evaluated while successor busy");
      @(negedge clk);
      check(tm_done && q_valid(tm_q), "tm: digit not valid 2 clocks after pb");
      check_result("tm", tm_q, tm_st, tm_sf, tm_ct, tm_cf, w, dd);
      check(all_empty(si_q, si_st, si_sf, si_ct, si_cf), "si: evaluated while successor busy");
      next_empty = 1;
      @(negedge clk);
      check(!tm_done, "tm: eval_done longer than one clock");
      @(negedge clk);
      check(si_done && q_valid(si_q), "si: digit not valid 2 clocks after successor empty");
      check_result("si", si_q, si_st, si_sf, si_ct, si_cf, w, dd);
      // ---- hold: inputs change, outputs stay ----
      begin
        qdigit_t h_q; logic [N-1:0] h_s;
        h_q = tm_q; h_s = tm_st;
        rs_t = N'({$urandom, $urandom}); rc_t = N'({$urandom, $urandom});
        rs_f = ~rs_t; rc_f = ~rc_t;
        repeat (2) @(negedge clk);
        check(tm_q == h_q && tm_st == h_s, "tm: outputs changed during hold");
      end
    end
    // ---- load ----
    @(negedge clk);
    load = 1; load_q = Q_ZERO; load_sum = 55'h123456789; load_car = 55'h42;
    @(negedge clk);
    load = 0;
    check(tm_q == Q_ZERO && tm_st == 55'h123456789 && tm_sf == ~55'h123456789 &&
          tm_ct == 55'h42, "load did not set the outputs");
    @(negedge clk);
    load = 1; load_q = Q_EMPTY;
    @(negedge clk);
    load = 0;
    check(all_empty(tm_q, tm_st, tm_sf, tm_ct, tm_cf), "load of empty did not clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
