// tb_r4_dacbns_butterfly: drives the CBNS butterfly at 8 and 16 digits.
// Expected outputs are computed on Gaussian integers: each product with the
// shift-and-add model of the DA unit, each sum and difference by exact
// complex addition reduced to N digits. A second set of cases uses
// B = C = D = 100..0 (the DA operand worth exactly 1) so that the products
// equal the twiddles and A' and C' have the closed forms A+Wc+Wb+Wd and
// A+Wc-Wb-Wd. Also checks the latency (done 2N+1 edges after the load edge),
// that results hold, and a restart by a load in the middle of an operation.
module tb_r4_dacbns_butterfly;
  import cbns_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;

  logic       load8 = 0, done8;
  logic [7:0] a8, b8, c8, d8, wb8, wc8, wd8, ya8, yb8, yc8, yd8;
  logic        load16 = 0, done16;
  logic [15:0] a16, b16, c16, d16, wb16, wc16, wd16, ya16, yb16, yc16, yd16;

  r4_dacbns_butterfly #(.N(8)) dut8 (
    .clk, .rst, .load(load8), .a(a8), .b(b8), .c(c8), .d(d8),
    .wb(wb8), .wc(wc8), .wd(wd8), .ya(ya8), .yb(yb8), .yc(yc8), .yd(yd8), .done(done8));
  r4_dacbns_butterfly #(.N(16)) dut16 (
    .clk, .rst, .load(load16), .a(a16), .b(b16), .c(c16), .d(d16),
    .wb(wb16), .wc(wc16), .wd(wd16), .ya(ya16), .yb(yb16), .yc(yc16), .yd(yd16), .done(done16));

  always #5 clk = ~clk;

  task automatic check(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Expected A', B', C', D' for n-digit words.
  task automatic model(input logic [63:0] a, b, c, d, wb, wc, wd, input int n,
                       output logic [63:0] ya, yb, yc, yd);
    logic [63:0] p_b, p_c, p_d, s_ac, d_ac, s_bd, d_bd, jt;
    p_b  = da_ref(b, wb, n);
    p_c  = da_ref(c, wc, n);
    p_d  = da_ref(d, wd, n);
    s_ac = add_ref(a, p_c, n);
    d_ac = sub_ref(a, p_c, n);
    s_bd = add_ref(p_b, p_d, n);
    d_bd = sub_ref(p_b, p_d, n);
    jt   = da_ref(64'b11, d_bd, n);
    ya   = add_ref(s_ac, s_bd, n);
    yb   = sub_ref(d_ac, jt, n);
    yc   = sub_ref(s_ac, s_bd, n);
    yd   = add_ref(d_ac, jt, n);
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run8(input logic [7:0] a, b, c, d, wb, wc, wd);
    int cyc;
    logic [63:0] ea, eb, ec, ed;
    model(64'(a), 64'(b), 64'(c), 64'(d), 64'(wb), 64'(wc), 64'(wd), 8, ea, eb, ec, ed);
    @(negedge clk);
    {a8, b8, c8, d8, wb8, wc8, wd8} = {a, b, c, d, wb, wc, wd};
    load8 = 1;
    @(negedge clk);
    load8 = 0;
    {a8, b8, c8, d8, wb8, wc8, wd8} = ~{a, b, c, d, wb, wc, wd};  // inputs only sampled at load
    cyc = 1;
    while (!done8 && cyc < 200) begin @(negedge clk); cyc++; end
    check(64'(cyc), 64'(2 * 8 + 2), "latency8");
    check(64'({ya8, yb8, yc8, yd8}), 64'({ea[7:0], eb[7:0], ec[7:0], ed[7:0]}), "out8");
    repeat (2) @(negedge clk);
    check(64'({done8, ya8, yb8, yc8, yd8}), 64'({1'b1, ea[7:0], eb[7:0], ec[7:0], ed[7:0]}), "hold8");
  endtask

  task automatic run16(input logic [15:0] a, b, c, d, wb, wc, wd);
    int cyc;
    logic [63:0] ea, eb, ec, ed;
    model(64'(a), 64'(b), 64'(c), 64'(d), 64'(wb), 64'(wc), 64'(wd), 16, ea, eb, ec, ed);
    @(negedge clk);
    {a16, b16, c16, d16, wb16, wc16, wd16} = {a, b, c, d, wb, wc, wd};
    load16 = 1;
    @(negedge clk);
    load16 = 0;
    cyc = 1;
    while (!done16 && cyc < 200) begin @(negedge clk); cyc++; end
    check(64'(cyc), 64'(2 * 16 + 2), "latency16");
    check({ya16, yb16, yc16, yd16}, {ea[15:0], eb[15:0], ec[15:0], ed[15:0]}, "out16");
  endtask

  initial begin
    {a8, b8, c8, d8, wb8, wc8, wd8} = '0;
    {a16, b16, c16, d16, wb16, wc16, wd16} = '0;
    @(negedge clk); rst = 0;
    check(64'(done8), 0, "idle after reset");
    // closed forms with unit operands
    for (int t = 0; t < 200; t++) begin
      logic [7:0] a, wb, wc, wd;
      longint ar, ai, br, bi, cr, ci, dr, di, yr, yi;
      a = 8'($urandom); wb = 8'($urandom); wc = 8'($urandom); wd = 8'($urandom);
      run8(a, 8'h80, 8'h80, 8'h80, wb, wc, wd);
      w2g(64'(a), 8, ar, ai); w2g(64'(wb), 8, br, bi); w2g(64'(wc), 8, cr, ci); w2g(64'(wd), 8, dr, di);
      w2g(64'(ya8), 8, yr, yi);
      check(64'({wrapm(yr, 4), wrapm(yi, 4)}), 64'({wrapm(ar + cr + br + dr, 4), wrapm(ai + ci + bi + di, 4)}), "A' closed form");
      w2g(64'(yc8), 8, yr, yi);
      check(64'({wrapm(yr, 4), wrapm(yi, 4)}), 64'({wrapm(ar + cr - br - dr, 4), wrapm(ai + ci - bi - di, 4)}), "C' closed form");
    end
    // restart in the middle of an operation
    @(negedge clk); {b8, c8, d8, wb8, wc8, wd8} = '1; load8 = 1;
    @(negedge clk); load8 = 0;
    repeat (12) @(negedge clk);
    run8(8'h12, 8'h34, 8'h56, 8'h78, 8'h9a, 8'hbc, 8'hde);
    for (int t = 0; t < 1500; t++)
      run8(8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom));
    for (int t = 0; t < 300; t++)
      run16(16'($urandom), 16'($urandom), 16'($urandom), 16'($urandom), 16'($urandom), 16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
