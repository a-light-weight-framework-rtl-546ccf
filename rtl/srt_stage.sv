// srt_stage: one stage of the self-timed radix-2 SRT divider ring.
//
// Datapath (one SRT iteration). The stage receives the carry-save partial
// remainder r(i-1) and quotient digit q(i-1) from its predecessor. qd_mux
// selects -d, 0 or +d (for q = +1, 0, -1), the carry-save adder forms
// w = r(i-1) - q(i-1)*d, a 4-bit carry-ripple adder resolves the top four
// digits of w, and the quotient select logic picks q(i) from them. The
// outgoing remainder r(i) = 2*w is the CSA output shifted one place left,
// which is only a relabelling of wires. Remainders are N-bit two's complement
// words with weights -2, 1, 1/2, ... so the divisor, in [1/2, 1), has its
// leading one at bit N-3.
//
// Phases. Like the precharged circuit it models, a stage cycles through
// precharge (pb low: all outputs are driven empty), evaluate (pb high and
// outputs empty: new values appear) and hold (pb high and outputs valid: the
// values stay put while the successor reads them). The remainder outputs are
// dual-rail, t/f per bit, both low = empty; the quotient output is the
// one-hot digit, all low = empty. A valid digit is the only completion signal
// the stage gives: the remainder settles R_EVAL_CYCLES after pb rises and the
// digit Q_EVAL_CYCLES after it, later because its path (CSA, CRA, QSL) is
// deeper; an assertion checks that the digit never becomes valid before every
// remainder rail is. Others check that the inputs are valid when evaluation
// starts and stay unchanged until the digit is captured. PRECHARGE_CYCLES
// after pb falls, all outputs are empty.
//
// Timing modes. With SPEED_INDEPENDENT = 0 (the chip's timed scheme) the
// stage does not look at its successor; correctness rests on the successor's
// precharge finishing before this stage's evaluation, i.e. on
// PRECHARGE_CYCLES < Q_EVAL_CYCLES. With SPEED_INDEPENDENT = 1 the stage waits
// until the successor's digit is empty before it evaluates, which works for
// any delays. The phase behaviour, dual-rail/one-hot codes, the datapath and
// both timing schemes follow the divider description; the cycle counts, the
// clocked emulation of the self-timed delays and the load port are this
// design's choices.
//
// Interface: clk/rst_n (asynchronous active-low reset empties all outputs);
// load (synchronous, overrides everything) sets the outputs to load_q and the
// load_sum/load_car words, or to empty if load_q is empty. eval_done pulses
// for one cycle together with the digit becoming valid by evaluation.
module srt_stage
  import srt_pkg::*;
#(
  parameter int unsigned N                 = 55,
  parameter int unsigned R_EVAL_CYCLES     = 1,
  parameter int unsigned Q_EVAL_CYCLES     = 2,
  parameter int unsigned PRECHARGE_CYCLES  = 1,
  parameter bit          SPEED_INDEPENDENT = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         pb,            // precharge-bar: low = precharge
  input  logic [N-1:0] d,             // divisor, remainder format
  // from the predecessor stage
  input  qdigit_t      q_in,
  input  logic [N-1:0] r_in_sum_t,
  input  logic [N-1:0] r_in_sum_f,
  input  logic [N-1:0] r_in_car_t,
  input  logic [N-1:0] r_in_car_f,
  // successor's digit is empty (used only when SPEED_INDEPENDENT = 1)
  input  logic         next_empty,
  // operand loading
  input  logic         load,
  input  qdigit_t      load_q,
  input  logic [N-1:0] load_sum,
  input  logic [N-1:0] load_car,
  // to the successor stage
  output qdigit_t      q_out,
  output logic [N-1:0] r_out_sum_t,
  output logic [N-1:0] r_out_sum_f,
  output logic [N-1:0] r_out_car_t,
  output logic [N-1:0] r_out_car_f,
  output logic         eval_done
);

  localparam int unsigned CMAX = (Q_EVAL_CYCLES > PRECHARGE_CYCLES) ?
                                 Q_EVAL_CYCLES : PRECHARGE_CYCLES;
  localparam int unsigned CW   = $clog2(CMAX + 1);

  // ---------------- datapath (combinational) ----------------
  // A dual-rail bit reads as its true rail; an empty bit reads as 0.
  logic [N-1:0] addend, w_sum, w_car, nxt_sum, nxt_car;
  logic         cin, cra_cout, unreachable;
  logic [3:0]   cra_sum;
  qdigit_t      q_new;

  qd_mux #(.N(N)) u_mux (
    .q(q_in), .d(d), .addend(addend), .cin(cin)
  );

  csa #(.N(N)) u_csa (
    .x(r_in_sum_t), .y(r_in_car_t), .z(addend), .cin(cin),
    .sum(w_sum), .carry(w_car)
  );

  ripple_adder #(.W(4)) u_cra (
    .a(w_sum[N-1 -: 4]), .b(w_car[N-1 -: 4]), .cin(1'b0),
    .sum(cra_sum), .cout(cra_cout)
  );

  qsl u_qsl (
    .cra_sum(cra_sum), .q(q_new), .unreachable(unreachable)
  );

  // shift: multiply by two by relabelling wires
  assign nxt_sum = {w_sum[N-2:0], 1'b0};
  assign nxt_car = {w_car[N-2:0], 1'b0};

  // ---------------- phases ----------------
  logic [CW-1:0] ev_cnt, pre_cnt;
  logic          eval_go;

  assign eval_go = SPEED_INDEPENDENT ? next_empty : 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_out       <= Q_EMPTY;
      r_out_sum_t <= '0;
      r_out_sum_f <= '0;
      r_out_car_t <= '0;
      r_out_car_f <= '0;
      ev_cnt      <= '0;
      pre_cnt     <= '0;
      eval_done   <= 1'b0;
    end else begin
      eval_done <= 1'b0;
      if (load) begin
        q_out       <= load_q;
        r_out_sum_t <= q_valid(load_q) ?  load_sum : '0;
        r_out_sum_f <= q_valid(load_q) ? ~load_sum : '0;
        r_out_car_t <= q_valid(load_q) ?  load_car : '0;
        r_out_car_f <= q_valid(load_q) ? ~load_car : '0;
        ev_cnt      <= '0;
        pre_cnt     <= '0;
      end else if (!pb) begin
        // precharge
        ev_cnt <= '0;
        if (pre_cnt + 1'b1 >= CW'(PRECHARGE_CYCLES)) begin
          q_out       <= Q_EMPTY;
          r_out_sum_t <= '0;
          r_out_sum_f <= '0;
          r_out_car_t <= '0;
          r_out_car_f <= '0;
        end else begin
          pre_cnt <= pre_cnt + 1'b1;
        end
      end else begin
        pre_cnt <= '0;
        if (!q_valid(q_out) && eval_go) begin
          // evaluate
          ev_cnt <= ev_cnt + 1'b1;
          if (ev_cnt + 1'b1 == CW'(R_EVAL_CYCLES)) begin
            r_out_sum_t <=  nxt_sum;
            r_out_sum_f <= ~nxt_sum;
            r_out_car_t <=  nxt_car;
            r_out_car_f <= ~nxt_car;
          end
          if (ev_cnt + 1'b1 == CW'(Q_EVAL_CYCLES)) begin
            q_out     <= q_new;
            eval_done <= 1'b1;
          end
        end
      end
    end
  end

  // ---------------- checks ----------------
  initial begin
    assert (R_EVAL_CYCLES >= 1 && R_EVAL_CYCLES < Q_EVAL_CYCLES)
      else $error("srt_stage: the remainder must settle before the digit");
  end

  // The digit is the last output to become valid: when it is valid, every
  // remainder bit carries a legal dual-rail value.
  assert property (@(posedge clk) disable iff (!rst_n)
    q_valid(q_out) |-> (&(r_out_sum_t ^ r_out_sum_f)) && (&(r_out_car_t ^ r_out_car_f)));

  assert property (@(posedge clk) disable iff (!rst_n) q_legal(q_out));

  // Evaluation reads a predecessor that holds a valid digit and remainder.
  assert property (@(posedge clk) disable iff (!rst_n)
    (pb && !load && !q_valid(q_out) && eval_go) |->
      q_valid(q_in) && (&(r_in_sum_t ^ r_in_sum_f)) && (&(r_in_car_t ^ r_in_car_f)));

  // The predecessor keeps its outputs unchanged for the whole evaluation.
  assert property (@(posedge clk) disable iff (!rst_n)
    (pb && !load && !q_valid(q_out) && eval_go && ev_cnt != '0) |->
      $stable(q_in) && $stable(r_in_sum_t) && $stable(r_in_sum_f) &&
      $stable(r_in_car_t) && $stable(r_in_car_f));

  // The invariant |w| <= d keeps the CRA sum inside the table.
  assert property (@(posedge clk) disable iff (!rst_n)
    (pb && !load && !q_valid(q_out) && eval_go && ev_cnt + 1'b1 == CW'(Q_EVAL_CYCLES))
      |-> !unreachable);

endmodule
