// bin2cbns: binary to radix (-1+j) converter.
//
// Takes a complex number as two (N/2)-bit two's complement integers, the real
// part re and imaginary part im, and produces its N-digit CBNS word z. The
// conversion is the usual digit-by-digit division by beta = (-1+j): the next
// digit is the parity of re + im, that digit is subtracted, and the rest is
// divided exactly by beta, (r + j i)/(-1+j) = ((i - r) + j(-r - i))/2. N such
// stages are unrolled into one combinational network of small adders; digits
// that would follow the N-th are dropped, which is exact because an N-digit
// word holds both parts modulo 2^(N/2).
//
// Fixed-point values convert the same way: a binary value with F fraction
// bits per part becomes a CBNS value with 2F fraction digits when F is a
// multiple of 4 (beta^8 = 16), e.g. 4 fraction bits <-> 8 fraction digits.
// The document specifies the conversion only by its result; this unrolled
// division is this design's choice. Combinational.
//
// Ports: re, im (N/2 bits each, signed), z (N digits).
module bin2cbns #(
  parameter int unsigned N = cbns_pkg::CBNS_N
) (
  input  logic signed [N/2-1:0] re,
  input  logic signed [N/2-1:0] im,
  output logic        [N-1:0]   z
);

  localparam int unsigned M  = N / 2;
  localparam int unsigned IW = M + 2;   // |parts| never grow past the input range + 1

  logic signed [IW-1:0] r, i, t;

  always_comb begin
    r = IW'(re);
    i = IW'(im);
    t = '0;
    z = '0;
    for (int k = 0; k < N; k++) begin
      z[k] = r[0] ^ i[0];
      r    = r - $signed(IW'(z[k]));
      t    = (i - r) >>> 1;
      i    = (-r - i) >>> 1;
      r    = t;
    end
  end

endmodule
