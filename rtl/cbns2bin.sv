// cbns2bin: radix (-1+j) to binary converter.
//
// Takes an N-digit CBNS word z and returns its real and imaginary parts as
// (N/2)-bit two's complement integers, i.e. modulo 2^(N/2). Each digit k
// contributes beta^k = (-1+j)^k; these weights are constants worked out at
// elaboration (cbns_pkg::beta_pow_re/_im), so the converter is two
// constant-coefficient sums of selected digits, each weight being 0 or a
// signed power of two (beta^4 = -4). The document names this converter and
// its job but not its circuit; the weighted sum is this design's choice.
// Combinational.
//
// Ports: z (N digits), re, im (N/2 bits each, signed).
module cbns2bin
  import cbns_pkg::*;
#(
  parameter int unsigned N = CBNS_N
) (
  input  logic        [N-1:0]   z,
  output logic signed [N/2-1:0] re,
  output logic signed [N/2-1:0] im
);

  localparam int unsigned M = N / 2;

  typedef logic [N-1:0][M-1:0] weight_t;

  function automatic weight_t make_weights(input bit imag);
    weight_t w;
    for (int k = 0; k < int'(N); k++) begin
      w[k] = M'(imag ? beta_pow_im(k) : beta_pow_re(k));
    end
    return w;
  endfunction

  localparam weight_t WRE = make_weights(1'b0);
  localparam weight_t WIM = make_weights(1'b1);

  always_comb begin
    re = '0;
    im = '0;
    for (int k = 0; k < N; k++) begin
      if (z[k]) begin
        re = re + $signed(WRE[k]);
        im = im + $signed(WIM[k]);
      end
    end
  end

endmodule
