// cbns_ref_pkg: reference arithmetic for the testbenches, written on plain
// Gaussian integers (real and imaginary parts as longint) rather than on
// digits, so the checks do not reuse the structure of the design under test.
//
// A word of n CBNS digits is decoded with exact powers of beta = (-1+j);
// n-digit words correspond one to one with Gaussian integers whose parts are
// taken modulo 2^(n/2), which is how results are compared.
package cbns_ref_pkg;

  // Exact value of an n-digit word.
  function automatic void w2g(input logic [63:0] w, input int n,
                              output longint re, output longint im);
    longint pr, pi, t;
    re = 0; im = 0; pr = 1; pi = 0;
    for (int k = 0; k < n; k++) begin
      if (w[k]) begin re += pr; im += pi; end
      t  = -pr - pi;
      pi = pr - pi;
      pr = t;
    end
  endfunction

  // Two's complement wrap of v to m bits.
  function automatic longint wrapm(input longint v, input int m);
    longint mod_, r;
    mod_ = longint'(1) << m;
    r = v % mod_;
    if (r < 0) r += mod_;
    if (r >= (mod_ >> 1)) r -= mod_;
    return r;
  endfunction

  // n-digit word of a Gaussian integer (digits above n dropped).
  function automatic logic [63:0] g2w(input longint re, input longint im, input int n);
    logic [63:0] w;
    longint a, b, na, nb;
    w = '0; a = re; b = im;
    for (int k = 0; k < n; k++) begin
      w[k] = ((a + b) % 2) != 0;
      if (w[k]) a = a - 1;
      // divide by (-1+j): (a+jb)/(-1+j) = ((b-a) + j(-a-b))/2
      na = (b - a) / 2;
      nb = (-a - b) / 2;
      a = na; b = nb;
    end
    return w;
  endfunction

  // Sum / difference of two words as words, through Gaussian integers.
  function automatic logic [63:0] add_ref(input logic [63:0] x, input logic [63:0] y, input int n);
    longint xr, xi, yr, yi;
    w2g(x, n, xr, xi); w2g(y, n, yr, yi);
    return g2w(xr + yr, xi + yi, n);
  endfunction

  function automatic logic [63:0] sub_ref(input logic [63:0] x, input logic [63:0] y, input int n);
    longint xr, xi, yr, yi;
    w2g(x, n, xr, xi); w2g(y, n, yr, yi);
    return g2w(xr - yr, xi - yi, n);
  endfunction

  // Shift-and-add product of the DA multiplier: n steps, digit t of x
  // (least significant first) adds v to the accumulator after the
  // accumulator has been shifted right by one digit (top digit cleared).
  function automatic logic [63:0] da_ref(input logic [63:0] x, input logic [63:0] v, input int n);
    logic [63:0] acc, mask;
    mask = (n >= 64) ? '1 : ((64'd1 << n) - 64'd1);
    acc = '0;
    for (int t = 0; t < n; t++) begin
      acc = (acc & mask) >> 1;
      if (x[t]) acc = add_ref(acc, v, n);
    end
    return acc & mask;
  endfunction

endpackage
