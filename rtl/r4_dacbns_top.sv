// r4_dacbns_top: complete DA-CBNS radix-4 butterfly with binary interfaces.
//
// Processing runs in three steps: the four binary complex inputs and the
// three binary twiddle factors are converted into radix (-1+j) words; the
// CBNS butterfly (r4_dacbns_butterfly) computes A', B', C', D'; the four
// results are converted back to binary. Each binary complex number is a pair
// of (N/2)-bit two's complement parts, the N-digit CBNS word holding the same
// information. Converting the twiddles in hardware rather than supplying
// precomputed CBNS constants is this design's choice; the flow itself is the
// published one.
//
// Twiddle ports take the binary form of W.beta^(N-1), the fraction form the
// DA units expect (see r4_dacbns_butterfly): W = 1 is (-8, -8) at N = 8 and
// (-128, -128) at N = 16. With all twiddles 1, A' = A+B+C+D and
// C' = A-B+C-D exactly (wrapped to N/2 bits).
//
// Timing: inputs are sampled on the load cycle (through the combinational
// input converters); done rises 2N+1 clock edges after the load edge, and
// the binary outputs are valid while done is high. Reset is asynchronous and
// active high.
//
// Ports: clk, rst, load; x_re/x_im[0..3] = A, B, C, D; w_re/w_im[0..2] =
// Wb, Wc, Wd; y_re/y_im[0..3] = A', B', C', D'; done.
module r4_dacbns_top
  import cbns_pkg::*;
#(
  parameter int unsigned N = CBNS_N
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 load,
  input  logic signed [N/2-1:0] x_re [4],
  input  logic signed [N/2-1:0] x_im [4],
  input  logic signed [N/2-1:0] w_re [3],
  input  logic signed [N/2-1:0] w_im [3],
  output logic signed [N/2-1:0] y_re [4],
  output logic signed [N/2-1:0] y_im [4],
  output logic                 done
);

  logic [N-1:0] xz [4];
  logic [N-1:0] wz [3];
  logic [N-1:0] yz [4];

  for (genvar k = 0; k < 4; k++) begin : g_in
    bin2cbns #(.N(N)) u_cvt (.re(x_re[k]), .im(x_im[k]), .z(xz[k]));
  end

  for (genvar k = 0; k < 3; k++) begin : g_tw
    bin2cbns #(.N(N)) u_cvt (.re(w_re[k]), .im(w_im[k]), .z(wz[k]));
  end

  r4_dacbns_butterfly #(.N(N)) u_bfly (
    .clk (clk),
    .rst (rst),
    .load(load),
    .a   (xz[0]),
    .b   (xz[1]),
    .c   (xz[2]),
    .d   (xz[3]),
    .wb  (wz[0]),
    .wc  (wz[1]),
    .wd  (wz[2]),
    .ya  (yz[0]),
    .yb  (yz[1]),
    .yc  (yz[2]),
    .yd  (yz[3]),
    .done(done)
  );

  for (genvar k = 0; k < 4; k++) begin : g_out
    cbns2bin #(.N(N)) u_cvt (.z(yz[k]), .re(y_re[k]), .im(y_im[k]));
  end

endmodule
