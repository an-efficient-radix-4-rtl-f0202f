// cbns_pkg: shared constants and elaboration-time helpers for arithmetic in
// the complex binary number system (CBNS), radix beta = (-1+j).
//
// An N-digit CBNS word d[N-1:0] stands for the Gaussian integer
// sum_k d[k]*beta^k. Because beta^N = (-2j)^(N/2) is a unit times 2^(N/2)
// for even N, keeping only N digits is the same as reducing the real and the
// imaginary part modulo 2^(N/2): an N-digit CBNS word carries exactly as much
// information as an (N/2)-bit real plus an (N/2)-bit imaginary part.
//
// The functions below are evaluated only on constants (table building and
// converter weights); none of them becomes a multiplier in hardware.
package cbns_pkg;

  // Default CBNS word width. The 8-digit build is the main configuration;
  // 16 digits is the larger one evaluated alongside it.
  parameter int unsigned CBNS_N = 8;

  // Width of the signed per-column count inside the ripple adder and
  // subtractor. A column sees its two operand digits plus single-bit carries
  // from lower columns; its value stays within [-1, 7] for word lengths up
  // to 64 digits (worst case found by enumerating which carry wires can be
  // active), so a 5-bit signed count leaves margin.
  localparam int unsigned CNT_W   = 5;
  localparam int          CNT_MIN = -1;
  localparam int          CNT_MAX = 15;
  localparam int unsigned CNT_NUM = CNT_MAX - CNT_MIN + 1;

  // CBNS digits (LSB first, up to 64) of the Gaussian integer re + j*im.
  // Standard digit extraction: the low digit is the parity of re+im; the
  // rest is (z - digit)/beta = (z - digit)*(-1-j)/2.
  function automatic logic [63:0] int_to_cbns(input longint re, input longint im);
    logic [63:0] d;
    longint r, i, t;
    r = re;
    i = im;
    for (int k = 0; k < 64; k++) begin
      d[k] = r[0] ^ i[0];
      r    = r - longint'(d[k]);
      t    = (i - r) >>> 1;
      i    = (-r - i) >>> 1;
      r    = t;
    end
    return d;
  endfunction

  // Real and imaginary parts of beta^k (exact while they fit in 64 bits).
  function automatic longint beta_pow_re(input int k);
    longint r, i, t;
    r = 1; i = 0;
    for (int n = 0; n < k; n++) begin
      t = -r - i;      // (r + j i)(-1 + j) = (-r - i) + j(r - i)
      i = r - i;
      r = t;
    end
    return r;
  endfunction

  function automatic longint beta_pow_im(input int k);
    longint r, i, t;
    r = 1; i = 0;
    for (int n = 0; n < k; n++) begin
      t = -r - i;
      i = r - i;
      r = t;
    end
    return i;
  endfunction

endpackage
