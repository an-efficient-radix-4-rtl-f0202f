// tb_nonlut_rom: exhaustive check at 8 digits that the partial product is v
// when the serial digit is 1 and 0 when it is 0.
module tb_nonlut_rom;
  localparam int N = 8;
  int checks = 0, failures = 0;
  logic xbit;
  logic [N-1:0] v, pp;

  nonlut_rom #(.N(N)) dut (.xbit, .v, .pp);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 2; b++) begin
      for (int i = 0; i < (1 << N); i++) begin
        xbit = b[0]; v = N'(i); #1;
        checks++;
        if (pp !== (b[0] ? N'(i) : '0)) begin
          failures++;
          $display("FAIL xbit=%0d v=%h pp=%h", b, v, pp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
