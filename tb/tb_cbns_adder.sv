// tb_cbns_adder: checks the CBNS adder at 8 digits exhaustively and at 16
// digits on random operands, against Gaussian-integer addition. Also checks
// the hand-worked cases 1 + 1 = 1100 and 2 + 2 = 4 = 1_1101_0000 (with an
// extended carry).
module tb_cbns_adder;
  import cbns_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0]  a8, b8, s8;
  logic [15:0] a16, b16, s16;

  cbns_adder #(.N(8))  dut8  (.a(a8),  .b(b8),  .s(s8));
  cbns_adder #(.N(16)) dut16 (.a(a16), .b(b16), .s(s16));

  task automatic check(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // worked examples
    a8 = 8'b0000_0001; b8 = 8'b0000_0001; #1;
    check(64'(s8), 64'b1100, "1+1");
    a16 = 16'b1100; b16 = 16'b1100; #1;
    check(64'(s16), 64'b1_1101_0000, "2+2");
    // exhaustive at 8 digits
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j); #1;
        check(64'(s8), add_ref(64'(a8), 64'(b8), 8), "add8");
      end
    end
    // random at 16 digits
    for (int t = 0; t < 20000; t++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); #1;
      check(64'(s16), add_ref(64'(a16), 64'(b16), 16), "add16");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
