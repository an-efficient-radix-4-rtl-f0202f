// cbns_subtractor: N-digit ripple subtractor in radix (-1+j), d = a - b.
//
// Subtraction follows the base-2 ripple-borrow scheme except where 1 is taken
// from 0: in this radix 0 - 1 = 11101, so the difference digit is 1 and a
// borrow expands into carries two, three and four places up (the carry one
// place up is always zero). Those carries are then added into the higher
// minuend digits with the CBNS adder rule (1 + 1 = 1100, longer patterns for
// larger totals). A column therefore never needs a borrow and an addition at
// the same time: its count is a[i] - b[i] plus the carry bits it received,
// which is never below -1. The difference digit is the low bit of that count
// and the CBNS representation of the count (table built at elaboration from
// cbns_pkg::int_to_cbns, decoded by comparators rather than read from a
// memory) gives the carry bits for the columns above; for a
// count of -1 that pattern is the 1110 of 0 - 1 = 11101.
//
// Carries at or above digit N are dropped: the result is a - b modulo
// beta^N (real and imaginary parts wrap modulo 2^(N/2)). Combinational.
//
// Ports: a  minuend, b  subtrahend, d  difference (N CBNS digits each).
module cbns_subtractor
  import cbns_pkg::*;
#(
  parameter int unsigned N = CBNS_N
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] d
);

  typedef logic [N-1:0]              carry_t;
  typedef logic [CNT_NUM-1:0][N-1:0] carry_tab_t;

  function automatic carry_tab_t make_carry_tab();
    carry_tab_t t;
    for (int v = CNT_MIN; v <= CNT_MAX; v++) begin
      t[v - CNT_MIN] = carry_t'(int_to_cbns(longint'(v), 0)) & ~carry_t'(1);
    end
    return t;
  endfunction

  localparam carry_tab_t CARRY_TAB = make_carry_tab();

  logic signed [CNT_W-1:0] col [N];
  carry_t                  cpat;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      col[i] = $signed(CNT_W'(a[i])) - $signed(CNT_W'(b[i]));
    end
    d    = '0;
    cpat = '0;
    for (int i = 0; i < N; i++) begin
      d[i] = col[i][0];
      // carry pattern of this column's count, decoded as gates: carry k
      // is set for each count whose CBNS form has digit k
      cpat = '0;
      for (int v = CNT_MIN; v <= CNT_MAX; v++) begin
        if (int'(col[i]) == v) cpat = cpat | CARRY_TAB[v - CNT_MIN];
      end
      for (int k = 1; k < N; k++) begin
        if (i + k < N) begin
          col[i + k] = col[i + k] + $signed(CNT_W'(cpat[k]));
        end
      end
    end
  end

endmodule
