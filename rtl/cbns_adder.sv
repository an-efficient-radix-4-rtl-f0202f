// cbns_adder: N-digit ripple-carry adder in radix (-1+j).
//
// In this radix 1 + 1 = 1100: the sum digit is 0 and carries go two and
// three places up, none to the next place. Larger column totals expand into
// longer carry patterns (4 = 1_1101_0000, the "extended carries"). The adder
// walks the columns from the least significant digit upward. Each column
// holds a small count: its two operand digits plus every carry bit already
// sent to it. Its sum digit is the low bit of that count, and the CBNS
// representation of the count, less that digit, gives the carry bits sent to
// the columns above. A constant table, built at elaboration from
// cbns_pkg::int_to_cbns, gives each possible count's carry pattern; it is
// decoded with comparators, so the adder is plain logic with no memory.
// For N = 8 this gives the structure of the published gate-level adder:
// columns 0 and 1 only add their two digits (half adders), column 2 also
// takes one carry (full adder), column 3 takes two (four-input adder), and
// extended carries reach further up.
//
// Carries that would land at or above digit N are dropped, so the result is
// the sum modulo beta^N, i.e. both real and imaginary parts wrap modulo
// 2^(N/2). Purely combinational.
//
// Ports: a, b  addends (N CBNS digits); s  sum (N CBNS digits).
module cbns_adder
  import cbns_pkg::*;
#(
  parameter int unsigned N = CBNS_N
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s
);

  typedef logic [N-1:0]              carry_t;
  typedef logic [CNT_NUM-1:0][N-1:0] carry_tab_t;

  // Carry pattern for every column count CNT_MIN..CNT_MAX: the count's own
  // CBNS digits with digit 0 (the sum digit) removed.
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
      col[i] = $signed(CNT_W'(a[i])) + $signed(CNT_W'(b[i]));
    end
    s    = '0;
    cpat = '0;
    for (int i = 0; i < N; i++) begin
      s[i] = col[i][0];
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
