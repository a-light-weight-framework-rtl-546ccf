// precharge_control: precharge-bar sequencing for the three-stage SRT ring.
//
// Stage i reads the outputs of stage i-1 and feeds stage i+1 (indices mod 3).
// The controller watches each stage's quotient digit, which doubles as that
// stage's completion signal, and drives the three precharge-bar lines:
//   * pb(i) falls (stage i starts precharging) once its successor has
//     evaluated and holds its result: pb(i) and pb(i+1) high, q(i+1) valid.
//   * pb(i) rises (stage i may evaluate) once its successor has started
//     precharging: pb(i) and pb(i+1) low, and run is high.
// Both rules are those of the divider's ring control; one of the three stages
// is always precharging, which cuts the ring's data dependency cycle. The
// "run" gate, which stops new evaluations when the quotient is complete, and
// the starting pattern (stage 0 evaluating, stage 1 precharging, stage 2
// holding the loaded operand, pb = H L H) are this design's choices.
//
// Interface: registered outputs; one rule may fire per stage per clock, all
// rules evaluated on the same registered state. rst_n (asynchronous) puts
// every stage into precharge; load sets the starting pattern.
module precharge_control (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic       run,
  input  logic [2:0] q_valid,  // stage i's digit is non-empty
  output logic [2:0] pb
);

  localparam logic [2:0] PB_START = 3'b101;  // pb(2)=H pb(1)=L pb(0)=H

  logic [2:0] pb_next, fall, rise;

  always_comb begin
    for (int i = 0; i < 3; i++) begin
      fall[i]    = pb[i] && pb[(i+1)%3] && q_valid[(i+1)%3];
      rise[i]    = run && !pb[i] && !pb[(i+1)%3];
      pb_next[i] = fall[i] ? 1'b0 : (rise[i] ? 1'b1 : pb[i]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     pb <= 3'b000;
    else if (load)  pb <= PB_START;
    else            pb <= pb_next;
  end

  // At least one stage is precharging while the ring runs.
  assert property (@(posedge clk) disable iff (!rst_n) pb != 3'b111);

endmodule
