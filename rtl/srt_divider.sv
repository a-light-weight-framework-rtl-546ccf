// srt_divider: self-timed radix-2 SRT mantissa divider (top level).
//
// Three identical divider stages form a ring: stage i takes the partial
// remainder and quotient digit of stage i-1 and produces the next ones, so a
// division circulates around the ring, one quotient digit per stage visit.
// The precharge controller lets each stage precharge, evaluate and hold in
// turn, with one stage always precharging so that data never chases itself
// round the ring. The quotient assembler collects the digits, stops the ring
// after ITER of them and converts the redundant quotient to binary.
//
// Operands are normalised mantissas: dividend C and divisor D, MW = N-2 bits
// each, the leading bit weighing 1/2, with 1/2 <= D < 1 and 0 < C < D (the
// conditions under which the SRT remainder bound |w| <= D holds from the
// start). On start the operand C is loaded into stage 2 as if that stage had
// just produced remainder C with digit 0, stage 0 starts evaluating and stage
// 1 precharges. When done rises, quotient = round-to-within-one of
// C/D * 2^ITER, and rem_sum + rem_car (mod 2^N) is 2*w of the stage that
// produced the last digit, so that C*2^ITER - quotient*D, scaled by 2^(N-2),
// equals the final remainder w_ITER = (rem_sum + rem_car) - q_last*D.
//
// Timing: one digit every Q_EVAL_CYCLES + 2 clocks (evaluate, then the
// predecessor starts precharging, then the successor is enabled). The ring of
// three stages, the 55-bit remainder buses, the 4-bit CRA and the timed
// control scheme follow the divider description. The clocked emulation of
// the self-timed delays, the number of digits (ITER, chosen as 53 mantissa
// bits plus two) and the operand-loading scheme are this design's choices.
//
// Alongside the divider, two example gates of the same precharged logic
// family are brought out on their own ports: the dual-rail AND-OR gate with
// completion detection (g_*) and its single-rail counterpart (s_*). Their
// keeper latches (three bits) are the only latches in the design and are
// intended.
module srt_divider
  import srt_pkg::*;
#(
  parameter int unsigned N                 = 55,
  parameter int unsigned ITER              = 55,
  parameter int unsigned R_EVAL_CYCLES     = 1,
  parameter int unsigned Q_EVAL_CYCLES     = 2,
  parameter int unsigned PRECHARGE_CYCLES  = 1,
  parameter bit          SPEED_INDEPENDENT = 1'b0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [N-3:0]  dividend,
  input  logic [N-3:0]  divisor,
  output logic          busy,
  output logic          done,
  output logic [ITER:0] quotient,
  output logic [N-1:0]  rem_sum,
  output logic [N-1:0]  rem_car,
  // ring observation: precharge-bar lines and per-stage completion
  output logic [2:0]    pb,
  output logic [2:0]    stage_valid,
  // example precharged dual-rail AND-OR gate
  input  logic          g_pb,
  input  logic          g_a_t, g_a_f, g_b_t, g_b_f, g_c_t, g_c_f,
  output logic          g_y_t, g_y_f, g_y_empty,
  // example single-rail precharged AND-OR gate
  input  logic          s_pb,
  input  logic          s_a, s_b, s_c,
  output logic          s_y
);

  logic [N-1:0] d_reg;
  logic         run;

  qdigit_t      q      [3];
  logic [N-1:0] sum_t  [3];
  logic [N-1:0] sum_f  [3];
  logic [N-1:0] car_t  [3];
  logic [N-1:0] car_f  [3];
  logic [2:0]   evt;

  // divisor register, remainder format (two integer bits of zero)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     d_reg <= '0;
    else if (start) d_reg <= {2'b00, divisor};
  end

  for (genvar i = 0; i < 3; i++) begin : g_stage
    localparam int P  = (i + 2) % 3;
    localparam int NX = (i + 1) % 3;

    srt_stage #(
      .N(N), .R_EVAL_CYCLES(R_EVAL_CYCLES), .Q_EVAL_CYCLES(Q_EVAL_CYCLES),
      .PRECHARGE_CYCLES(PRECHARGE_CYCLES), .SPEED_INDEPENDENT(SPEED_INDEPENDENT)
    ) u_stage (
      .clk(clk), .rst_n(rst_n), .pb(pb[i]), .d(d_reg),
      .q_in(q[P]),
      .r_in_sum_t(sum_t[P]), .r_in_sum_f(sum_f[P]),
      .r_in_car_t(car_t[P]), .r_in_car_f(car_f[P]),
      .next_empty(!q_valid(q[NX])),
      .load(start),
      .load_q((i == 2) ? Q_ZERO : Q_EMPTY),
      .load_sum({2'b00, dividend}), .load_car('0),
      .q_out(q[i]),
      .r_out_sum_t(sum_t[i]), .r_out_sum_f(sum_f[i]),
      .r_out_car_t(car_t[i]), .r_out_car_f(car_f[i]),
      .eval_done(evt[i])
    );

    assign stage_valid[i] = q_valid(q[i]);
  end

  precharge_control u_ctrl (
    .clk(clk), .rst_n(rst_n), .load(start), .run(run),
    .q_valid(stage_valid), .pb(pb)
  );

  // at most one stage finishes an evaluation in any clock
  qdigit_t      digit;
  logic [N-1:0] dsum, dcar;
  always_comb begin
    digit = Q_EMPTY;
    dsum  = '0;
    dcar  = '0;
    for (int i = 0; i < 3; i++) begin
      if (evt[i]) begin
        digit = q[i];
        dsum  = sum_t[i];
        dcar  = car_t[i];
      end
    end
  end

  quotient_assembler #(.N(N), .ITER(ITER)) u_asm (
    .clk(clk), .rst_n(rst_n), .start(start),
    .digit_evt(|evt), .digit(digit),
    .rem_sum_in(dsum), .rem_car_in(dcar),
    .run(run), .busy(busy), .done(done), .quotient(quotient),
    .rem_sum(rem_sum), .rem_car(rem_car)
  );

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(evt));

  // The timed scheme is only safe if a stage finishes precharging before its
  // predecessor can produce a new digit.
  initial begin
    assert (SPEED_INDEPENDENT || PRECHARGE_CYCLES < Q_EVAL_CYCLES)
      else $error("srt_divider: timed control needs PRECHARGE_CYCLES < Q_EVAL_CYCLES");
  end

  dr_and_or u_gate (
    .pb(g_pb), .a_t(g_a_t), .a_f(g_a_f), .b_t(g_b_t), .b_f(g_b_f),
    .c_t(g_c_t), .c_f(g_c_f), .y_t(g_y_t), .y_f(g_y_f), .y_empty(g_y_empty)
  );

  pc_and_or u_sgate (.pb(s_pb), .a(s_a), .b(s_b), .c(s_c), .y(s_y));

endmodule
