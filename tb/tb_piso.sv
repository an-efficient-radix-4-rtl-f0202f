// tb_piso: loads random words into the shift register and checks that the
// serial output presents digits 0..N-1 in order on consecutive shift cycles,
// that it holds while shift is low, and that zeros follow the last digit.
module tb_piso;
  localparam int N = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, load = 0, shift = 0;
  logic [N-1:0] x;
  logic sout;

  piso #(.N(N)) dut (.clk, .rst, .load, .shift, .x, .sout);

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0;
    @(negedge clk); rst = 0;
    check(sout, 1'b0, "reset");
    for (int t = 0; t < 100; t++) begin
      logic [N-1:0] w;
      w = N'($urandom);
      @(negedge clk); x = w; load = 1; shift = 1;   // load wins over shift
      @(negedge clk); load = 0; shift = 0; x = ~w;
      check(sout, w[0], "digit0");
      @(negedge clk);                                // hold
      check(sout, w[0], "hold");
      for (int k = 1; k < N + 2; k++) begin
        shift = 1;
        @(negedge clk);
        check(sout, (k < N) ? w[k] : 1'b0, "digit");
      end
      shift = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
