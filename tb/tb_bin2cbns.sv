// tb_bin2cbns: exhaustive check at 8 and 16 digits that the converter's word
// has the value re + j*im (parts modulo 2^(N/2)), and a 24-digit check of the
// worked example 181 + 181j = 1110_1110_0110_0110_1110 (this is
// 0.70703125 + j0.70703125 with its radix point 16 digits from the right).
module tb_bin2cbns;
  import cbns_ref_pkg::*;
  int checks = 0, failures = 0;

  logic signed [3:0]  re8, im8;
  logic        [7:0]  z8;
  logic signed [7:0]  re16, im16;
  logic        [15:0] z16;
  logic signed [11:0] re24, im24;
  logic        [23:0] z24;

  bin2cbns #(.N(8))  dut8  (.re(re8),  .im(im8),  .z(z8));
  bin2cbns #(.N(16)) dut16 (.re(re16), .im(im16), .z(z16));
  bin2cbns #(.N(24)) dut24 (.re(re24), .im(im24), .z(z24));

  task automatic check_val(input logic [63:0] w, input int n, input longint er, input longint ei);
    longint gr, gi;
    w2g(w, n, gr, gi);
    checks++;
    if (wrapm(gr, n / 2) != er || wrapm(gi, n / 2) != ei) begin
      failures++;
      if (failures < 10) $display("FAIL n=%0d w=%h -> (%0d,%0d) expected (%0d,%0d)", n, w, gr, gi, er, ei);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    re24 = 12'sd181; im24 = 12'sd181; #1;
    checks++;
    if (z24 !== 24'b0000_1110_1110_0110_0110_1110) begin
      failures++;
      $display("FAIL 181+181j -> %b", z24);
    end
    for (int a = -8; a < 8; a++)
      for (int b = -8; b < 8; b++) begin
        re8 = 4'(a); im8 = 4'(b); #1;
        check_val(64'(z8), 8, a, b);
      end
    for (int a = -128; a < 128; a++)
      for (int b = -128; b < 128; b++) begin
        re16 = 8'(a); im16 = 8'(b); #1;
        check_val(64'(z16), 16, a, b);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
