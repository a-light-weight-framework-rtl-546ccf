// quotient_assembler: collects SRT quotient digits and converts them to binary.
//
// Each digit a stage produces is shifted into two words: a 1 enters the
// "plus" word for digit +1 and the "minus" word for digit -1 (digit 0 enters
// a 0 in both). The first digit lands in the most significant bit. After
// ITER digits the redundant quotient plus - minus is turned into an ordinary
// binary number by one subtraction in a carry-ripple adder (plus + ~minus + 1).
// With digits q_0..q_{ITER-1}, where q_0 has weight 1 for the value 2C/D,
// quotient = sum_j q_j * 2^(ITER-1-j) approximates C/D * 2^ITER to within one
// unit. The split into two words and the single final subtraction follow the
// divider description; the counter, the run/done handshake and capturing the
// last stage's remainder are this design's choices.
//
// Interface: start (synchronous) clears the words and the count and raises
// busy. digit_evt marks one clock in which digit, rem_sum and rem_car belong
// to a freshly evaluated stage. run is high while more digits are wanted; done
// rises in the clock after the ITER-th digit and stays until the next start.
// quotient is combinational from the words and is final when done is high;
// rem_sum/rem_car hold the carry-save remainder 2*w of the last stage.
module quotient_assembler
  import srt_pkg::*;
#(
  parameter int unsigned N    = 55,
  parameter int unsigned ITER = 55
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          digit_evt,
  input  qdigit_t       digit,
  input  logic [N-1:0]  rem_sum_in,
  input  logic [N-1:0]  rem_car_in,
  output logic          run,
  output logic          busy,
  output logic          done,
  output logic [ITER:0] quotient,
  output logic [N-1:0]  rem_sum,
  output logic [N-1:0]  rem_car
);

  localparam int unsigned KW = $clog2(ITER + 1);

  logic [ITER-1:0] plus_w, minus_w;
  logic [KW-1:0]   count;
  logic            conv_cout;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      plus_w  <= '0;
      minus_w <= '0;
      count   <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
      rem_sum <= '0;
      rem_car <= '0;
    end else if (start) begin
      plus_w  <= '0;
      minus_w <= '0;
      count   <= '0;
      busy    <= 1'b1;
      done    <= 1'b0;
    end else if (busy && digit_evt) begin
      plus_w  <= {plus_w[ITER-2:0],  digit.pos};
      minus_w <= {minus_w[ITER-2:0], digit.neg};
      count   <= count + 1'b1;
      if (count == KW'(ITER - 1)) begin
        busy    <= 1'b0;
        done    <= 1'b1;
        rem_sum <= rem_sum_in;
        rem_car <= rem_car_in;
      end
    end
  end

  assign run = busy;

  // final conversion: quotient = plus - minus
  ripple_adder #(.W(ITER + 1)) u_conv (
    .a({1'b0, plus_w}), .b(~{1'b0, minus_w}), .cin(1'b1),
    .sum(quotient), .cout(conv_cout)
  );

  assert property (@(posedge clk) disable iff (!rst_n)
    digit_evt |-> q_valid(digit) && q_legal(digit));

endmodule
