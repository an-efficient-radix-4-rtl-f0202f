// tb_da_cbns: runs the DA multiplier at 8 and 16 digits on random and
// hand-picked operands and compares y with a shift-and-add model computed on
// Gaussian integers. Checks that done rises exactly N cycles after the load
// cycle, that the result then holds, that x = 100..0 returns v unchanged
// (and v = 100..0 returns x),
// and that a load in the middle of an operation restarts it cleanly.
module tb_da_cbns;
  import cbns_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;

  logic        load8 = 0, done8;
  logic [7:0]  x8, v8, y8;
  logic        load16 = 0, done16;
  logic [15:0] x16, v16, y16;

  da_cbns #(.N(8))  dut8  (.clk, .rst, .load(load8),  .x(x8),  .v(v8),  .y(y8),  .done(done8));
  da_cbns #(.N(16)) dut16 (.clk, .rst, .load(load16), .x(x16), .v(v16), .y(y16), .done(done16));

  always #5 clk = ~clk;

  task automatic check(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run8(input logic [7:0] x, input logic [7:0] v);
    int cyc;
    @(negedge clk); x8 = x; v8 = v; load8 = 1;
    @(negedge clk); load8 = 0; x8 = ~x;   // x only needed on the load cycle
    cyc = 1;
    while (!done8 && cyc < 100) begin @(negedge clk); cyc++; end
    check(64'(cyc), 64'(9), "latency8");  // load cycle + 8 accumulation cycles
    check(64'(y8), da_ref(64'(x), 64'(v), 8), "y8");
    repeat (3) @(negedge clk);
    check(64'({done8, y8}), 64'({1'b1, 8'(da_ref(64'(x), 64'(v), 8))}), "hold8");
  endtask

  task automatic run16(input logic [15:0] x, input logic [15:0] v);
    int cyc;
    @(negedge clk); x16 = x; v16 = v; load16 = 1;
    @(negedge clk); load16 = 0;
    cyc = 1;
    while (!done16 && cyc < 100) begin @(negedge clk); cyc++; end
    check(64'(cyc), 64'(17), "latency16");
    check(64'(y16), da_ref(64'(x), 64'(v), 16), "y16");
  endtask

  initial begin
    x8 = 0; v8 = 0; x16 = 0; v16 = 0;
    @(negedge clk); rst = 0;
    check(64'(done8), 64'(0), "done after reset");
    // x = 1 (top digit worth one): y = v exactly
    run8(8'h80, 8'h5b);
    check(64'(y8), 64'h5b, "unit8");
    // v = 1 (fraction form): y = x exactly
    run8(8'h5b, 8'h80);
    check(64'(y8), 64'h5b, "unit v8");
    run8(8'h00, 8'hff);
    check(64'(y8), 64'h00, "zero8");
    run16(16'h8000, 16'hbeef);
    check(64'(y16), 64'hbeef, "unit16");
    // restart: load again half way through
    @(negedge clk); x8 = 8'hff; v8 = 8'hff; load8 = 1;
    @(negedge clk); load8 = 0;
    repeat (4) @(negedge clk);
    run8(8'h3c, 8'ha7);
    for (int t = 0; t < 2000; t++) run8(8'($urandom), 8'($urandom));
    for (int t = 0; t < 1000; t++) run16(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
