// tb_cbns2bin: exhaustive check at 8 and 16 digits that every CBNS word is
// converted to the real and imaginary parts of its value, modulo 2^(N/2),
// plus the hand-worked words 1100 = 2, 11101 = -1 and 11 = j.
module tb_cbns2bin;
  import cbns_ref_pkg::*;
  int checks = 0, failures = 0;

  logic        [7:0]  z8;
  logic signed [3:0]  re8, im8;
  logic        [15:0] z16;
  logic signed [7:0]  re16, im16;

  cbns2bin #(.N(8))  dut8  (.z(z8),  .re(re8),  .im(im8));
  cbns2bin #(.N(16)) dut16 (.z(z16), .re(re16), .im(im16));

  task automatic check(input longint gr, input longint gi, input longint er, input longint ei, input string what);
    checks++;
    if (gr != er || gi != ei) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got (%0d,%0d) expected (%0d,%0d)", what, gr, gi, er, ei);
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
    longint er, ei;
    z8 = 8'b1100;   #1; check(re8, im8, 2, 0, "two");
    z8 = 8'b11101;  #1; check(re8, im8, -1, 0, "minus one");
    z8 = 8'b11;     #1; check(re8, im8, 0, 1, "j");
    for (int w = 0; w < 256; w++) begin
      z8 = 8'(w); #1;
      w2g(64'(w), 8, er, ei);
      check(re8, im8, wrapm(er, 4), wrapm(ei, 4), "n8");
    end
    for (int w = 0; w < 65536; w++) begin
      z16 = 16'(w); #1;
      w2g(64'(w), 16, er, ei);
      check(re16, im16, wrapm(er, 8), wrapm(ei, 8), "n16");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
