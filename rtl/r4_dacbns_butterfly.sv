// r4_dacbns_butterfly: radix-4 decimation-in-time butterfly computed in the
// complex binary number system (radix -1+j) with distributed-arithmetic
// multipliers, so that no hardware multiplier is used.
//
// Every complex value is one N-digit CBNS word. The outputs follow
//   A' = (A + C.Wc) +  (B.Wb + D.Wd)
//   B' = (A - C.Wc) - j(B.Wb - D.Wd)
//   C' = (A + C.Wc) -  (B.Wb + D.Wd)
//   D' = (A - C.Wc) + j(B.Wb - D.Wd)
// which reuses four partial sums. Hardware: three DA-CBNS multipliers (B.Wb,
// C.Wc, D.Wd); a first level of two adders and two subtractors forming
// A+C.Wc, A-C.Wc, B.Wb+D.Wd, B.Wb-D.Wd; a fourth DA-CBNS multiplier applying
// the j factor to B.Wb-D.Wd; and a second level of two adders and two
// subtractors forming the outputs. This count (4 DA units, 8 adders and
// subtractors, plus one adder inside each DA unit) and the wiring follow the
// published structure.
//
// The j multiplier is a DA unit whose serial operand is the constant J_WORD
// (default 0...011, the CBNS integer j) and whose coefficient is B.Wb-D.Wd.
// The DA unit computes x . v / beta^(N-1) (see da_cbns), so a twiddle W is
// supplied as the word of W.beta^(N-1) (W as a CBNS fraction with its top
// digit worth 1) and the products B.Wb, C.Wc, D.Wd come out in the data's
// scaling. With the default J_WORD, however, the j branch contributes
// j.(B.Wb-D.Wd)/beta^(N-1) rather than j.(B.Wb-D.Wd): A' and C' are exact
// butterfly outputs, B' and D' are those of the published circuit. No
// N-digit word is j in the fraction form (j needs the beta^1 digit); the
// design keeps the published constant.
//
// Control (this design's own; the document instantiates the blocks side by
// side with a shared clock and reset): a load cycle registers A and the
// twiddles and starts the three twiddle multipliers, which run N cycles.
// Because the j multiplier needs their result as its coefficient, it is
// started when they finish and runs another N cycles. done then rises and
// the outputs (combinational from the held accumulators) stay valid until
// the next load. Latency: done is high 2N+1 clock edges after the load edge.
// A load at any time restarts the operation.
//
// Ports: clk, rst (async, active high), load; a, b, c, d inputs and wb, wc,
// wd twiddles (N digits each, sampled on the load cycle); ya, yb, yc, yd =
// A', B', C', D'; done.
module r4_dacbns_butterfly
  import cbns_pkg::*;
#(
  parameter int unsigned   N      = CBNS_N,
  parameter logic [N-1:0]  J_WORD = N'(2'b11)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  input  logic [N-1:0] d,
  input  logic [N-1:0] wb,
  input  logic [N-1:0] wc,
  input  logic [N-1:0] wd,
  output logic [N-1:0] ya,
  output logic [N-1:0] yb,
  output logic [N-1:0] yc,
  output logic [N-1:0] yd,
  output logic         done
);

  typedef enum logic [1:0] {
    S_IDLE,   // nothing started since reset
    S_MUL,    // twiddle multipliers running
    S_JMUL    // j multiplier running, then holding the result
  } state_t;

  state_t       state;
  logic [N-1:0] a_q, wb_q, wc_q, wd_q;
  logic [N-1:0] bwb, cwc, dwd, jterm;
  logic         done_b, done_c, done_d, done_j, load_j;
  logic [N-1:0] sum_ac, dif_ac, sum_bd, dif_bd;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      a_q  <= '0;
      wb_q <= '0;
      wc_q <= '0;
      wd_q <= '0;
    end else if (load) begin
      a_q  <= a;
      wb_q <= wb;
      wc_q <= wc;
      wd_q <= wd;
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state <= S_IDLE;
    end else if (load) begin
      state <= S_MUL;
    end else if (load_j) begin
      state <= S_JMUL;
    end
  end

  assign load_j = (state == S_MUL) && done_b;
  assign done   = (state == S_JMUL) && done_j;

  // ---- step 1: twiddle multiplications ----
  da_cbns #(.N(N)) u_da_b (.clk(clk), .rst(rst), .load(load), .x(b), .v(wb_q), .y(bwb), .done(done_b));
  da_cbns #(.N(N)) u_da_c (.clk(clk), .rst(rst), .load(load), .x(c), .v(wc_q), .y(cwc), .done(done_c));
  da_cbns #(.N(N)) u_da_d (.clk(clk), .rst(rst), .load(load), .x(d), .v(wd_q), .y(dwd), .done(done_d));

  // ---- first level: shared partial sums ----
  cbns_adder      #(.N(N)) u_add_ac (.a(a_q), .b(cwc), .s(sum_ac));
  cbns_subtractor #(.N(N)) u_sub_ac (.a(a_q), .b(cwc), .d(dif_ac));
  cbns_adder      #(.N(N)) u_add_bd (.a(bwb), .b(dwd), .s(sum_bd));
  cbns_subtractor #(.N(N)) u_sub_bd (.a(bwb), .b(dwd), .d(dif_bd));

  // ---- j factor ----
  da_cbns #(.N(N)) u_da_j (.clk(clk), .rst(rst), .load(load_j), .x(J_WORD), .v(dif_bd), .y(jterm), .done(done_j));

  // ---- second level: outputs ----
  cbns_adder      #(.N(N)) u_add_ya (.a(sum_ac), .b(sum_bd), .s(ya));
  cbns_subtractor #(.N(N)) u_sub_yb (.a(dif_ac), .b(jterm),  .d(yb));
  cbns_subtractor #(.N(N)) u_sub_yc (.a(sum_ac), .b(sum_bd), .d(yc));
  cbns_adder      #(.N(N)) u_add_yd (.a(dif_ac), .b(jterm),  .s(yd));

  // The three twiddle multipliers start together and must all have finished
  // (and hold) while the j multiplier consumes their result.
  a_sync_mul : assert property (@(posedge clk) disable iff (rst)
    (state == S_JMUL) |-> (done_b && done_c && done_d))
    else $error("twiddle multipliers not finished during the j step");

  if (N % 2 != 0) begin : g_bad_n
    $error("N must be even");
  end

endmodule
