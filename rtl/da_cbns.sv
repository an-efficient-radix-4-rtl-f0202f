// da_cbns: distributed-arithmetic multiplier in radix (-1+j), y = x . v.
//
// Datapath (in the order of the published block diagram):
//   1 PISO            shifts x out least significant digit first;
//   2 non-LUT ROM     turns that digit into a partial product (0 or v);
//   3 CBNS adder      adds the partial product to the shifted accumulator;
//   4 D flip-flops    hold the accumulator (asynchronous reset);
//   5 output          y is the accumulator;
//   6 right shift     the accumulator is fed back shifted right by one digit.
// The shift is logical (0 enters at the top), not arithmetic: in radix
// (-1+j) the top digit carries no sign.
//
// After the N digits of x have been used, the accumulator holds
//   y = x . v / beta^(N-1)  (beta = -1+j),
// with the digits that fell off the bottom at each shift discarded. As fixed
// point: one operand is a CBNS fraction whose top digit is worth 1 (the word
// 1000..0 is exactly 1) and y has the scaling of the other. x = 1000..0 gives
// y = v, and v = 1000..0 gives y = x. The butterfly treats v, the twiddle, as
// the fraction. This follows from the published recurrence (LSB first, N
// cycles, N-digit accumulator with a logical right shift).
//
// Control, which the published description leaves open, is this design's:
// a load cycle captures x in the PISO and clears the accumulator; the next N
// cycles accumulate, one digit each; then the accumulator holds its value and
// done rises. done is high from N cycles after the load cycle until the next
// load. v must stay stable during the N accumulation cycles.
//
// Ports: clk, rst (async, active high), load, x, v (N digits), y (N digits),
// done.
module da_cbns
  import cbns_pkg::*;
#(
  parameter int unsigned N = CBNS_N
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic [N-1:0] x,
  input  logic [N-1:0] v,
  output logic [N-1:0] y,
  output logic         done
);

  localparam int unsigned CW = $clog2(N + 1);

  logic [CW-1:0] steps_left;
  logic          busy;
  logic          xbit;
  logic [N-1:0]  pp, acc, acc_shr, acc_next;

  assign busy = (steps_left != '0);

  piso #(.N(N)) u_piso (
    .clk  (clk),
    .rst  (rst),
    .load (load),
    .shift(busy),
    .x    (x),
    .sout (xbit)
  );

  nonlut_rom #(.N(N)) u_rom (
    .xbit(xbit),
    .v   (v),
    .pp  (pp)
  );

  assign acc_shr = acc >> 1;

  cbns_adder #(.N(N)) u_add (
    .a(pp),
    .b(acc_shr),
    .s(acc_next)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      acc        <= '0;
      steps_left <= '0;
      done       <= 1'b0;
    end else if (load) begin
      acc        <= '0;
      steps_left <= CW'(N);
      done       <= 1'b0;
    end else if (busy) begin
      acc        <= acc_next;
      steps_left <= steps_left - 1'b1;
      done       <= (steps_left == CW'(1));
    end
  end

  assign y = acc;

endmodule
