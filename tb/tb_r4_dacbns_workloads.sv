// tb_r4_dacbns_workloads: the 16-digit configuration (8-bit real and
// imaginary parts) of the complete butterfly, run end to end. Same checks as
// the default-size end-to-end test: random operations against a
// Gaussian-integer model, latency 2N+1 edges, output hold, each mechanism
// exercised, and 4-point DFTs with unit twiddles (binary -128-128j, i.e.
// beta^15) whose A' and C' must equal A+B+C+D and A-B+C-D.
module tb_r4_dacbns_workloads;
  import cbns_ref_pkg::*;

  localparam int N = 16;
  localparam int M = N / 2;

  int checks = 0, failures = 0;
  int n_ops = 0, n_dft4 = 0, n_ext_carry = 0, n_borrow = 0, n_wrap = 0, n_jstep = 0, n_restart = 0;

  logic clk = 0, rst = 1, load = 0, done;
  logic signed [M-1:0] x_re [4], x_im [4], w_re [3], w_im [3], y_re [4], y_im [4];

  r4_dacbns_top #(.N(N)) dut (.clk, .rst, .load, .x_re, .x_im, .w_re, .w_im, .y_re, .y_im, .done);

  always #5 clk = ~clk;

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // j step seen: the j multiplier runs while the butterfly is in its second phase
  always @(posedge clk) if (!rst && dut.u_bfly.load_j) n_jstep++;

  function automatic logic [63:0] enc(input longint re, input longint im);
    return g2w(re, im, N);
  endfunction

  function automatic void dec(input logic [63:0] w, output longint re, output longint im);
    longint r, i;
    w2g(w, N, r, i);
    re = wrapm(r, M);
    im = wrapm(i, M);
  endfunction

  // does adding/subtracting the decoded parts leave the M-bit range?
  function automatic bit wraps(input logic [63:0] p, input logic [63:0] q, input bit sub);
    longint pr, pi, qr, qi, rr, ri, lim;
    dec(p, pr, pi); dec(q, qr, qi);
    rr = sub ? pr - qr : pr + qr;
    ri = sub ? pi - qi : pi + qi;
    lim = longint'(1) << (M - 1);
    return (rr >= lim) || (rr < -lim) || (ri >= lim) || (ri < -lim);
  endfunction

  task automatic run_op(input logic signed [M-1:0] xr [4], xi [4], wr [3], wi [3]);
    logic [63:0] a, b, c, d, wb, wc, wd, p_b, p_c, p_d, s_ac, d_ac, s_bd, d_bd, jt;
    logic [63:0] yw [4];
    longint er, ei;
    int cyc;
    bit ext, brw;
    a  = enc(xr[0], xi[0]); b  = enc(xr[1], xi[1]);
    c  = enc(xr[2], xi[2]); d  = enc(xr[3], xi[3]);
    wb = enc(wr[0], wi[0]); wc = enc(wr[1], wi[1]); wd = enc(wr[2], wi[2]);
    p_b  = da_ref(b, wb, N);
    p_c  = da_ref(c, wc, N);
    p_d  = da_ref(d, wd, N);
    s_ac = add_ref(a, p_c, N);
    d_ac = sub_ref(a, p_c, N);
    s_bd = add_ref(p_b, p_d, N);
    d_bd = sub_ref(p_b, p_d, N);
    jt   = da_ref(64'b11, d_bd, N);
    yw[0] = add_ref(s_ac, s_bd, N);
    yw[1] = sub_ref(d_ac, jt, N);
    yw[2] = sub_ref(s_ac, s_bd, N);
    yw[3] = add_ref(d_ac, jt, N);
    if (wraps(s_ac, s_bd, 0) || wraps(d_ac, jt, 1) || wraps(s_ac, s_bd, 1) || wraps(d_ac, jt, 0))
      n_wrap++;

    @(negedge clk);
    x_re = xr; x_im = xi; w_re = wr; w_im = wi;
    load = 1;
    @(negedge clk);
    load = 0;
    foreach (x_re[k]) begin x_re[k] = ~xr[k]; x_im[k] = ~xi[k]; end
    cyc = 1;
    while (!done && cyc < 200) begin @(negedge clk); cyc++; end
    check(cyc, 2 * N + 2, "latency");
    for (int k = 0; k < 4; k++) begin
      dec(yw[k], er, ei);
      check(y_re[k], er, $sformatf("y_re[%0d]", k));
      check(y_im[k], ei, $sformatf("y_im[%0d]", k));
    end
    ext = 0; brw = 0;
    for (int i = 0; i < N; i++) begin
      if (dut.u_bfly.u_add_ya.col[i] >= 4 || dut.u_bfly.u_add_yd.col[i] >= 4) ext = 1;
      if (dut.u_bfly.u_sub_yb.col[i] == -1 || dut.u_bfly.u_sub_yc.col[i] == -1) brw = 1;
    end
    n_ext_carry += int'(ext);
    n_borrow    += int'(brw);
    repeat (2) @(negedge clk);
    check(done, 1, "done holds");
    dec(yw[0], er, ei);
    check(y_re[0], er, "y_re[0] holds");
    n_ops++;
  endtask

  initial begin
    logic signed [M-1:0] xr [4], xi [4], wr [3], wi [3];
    foreach (x_re[k]) begin x_re[k] = '0; x_im[k] = '0; end
    foreach (w_re[k]) begin w_re[k] = '0; w_im[k] = '0; end
    @(negedge clk); rst = 0;
    @(negedge clk);
    check(done, 0, "idle after reset");

    // restart: start an operation, abandon it half way with a new load
    foreach (xr[k]) begin xr[k] = M'(7); xi[k] = -M'(8); end
    foreach (wr[k]) begin wr[k] = M'(5); wi[k] = M'(3); end
    x_re = xr; x_im = xi; w_re = wr; w_im = wi;
    load = 1; @(negedge clk); load = 0;
    repeat (N + 3) @(negedge clk);
    if (!done) n_restart++;
    foreach (xr[k]) begin xr[k] = M'(k + 1); xi[k] = -M'(k); end
    foreach (wr[k]) begin wr[k] = M'(1); wi[k] = M'(0); end
    run_op(xr, xi, wr, wi);

    for (int t = 0; t < 2000; t++) begin
      foreach (xr[k]) begin xr[k] = M'($urandom); xi[k] = M'($urandom); end
      foreach (wr[k]) begin wr[k] = M'($urandom); wi[k] = M'($urandom); end
      run_op(xr, xi, wr, wi);
    end

    // 4-point DFTs with unit twiddles
    for (int t = 0; t < 500; t++) begin
      longint sr, si, cr, ci;
      foreach (xr[k]) begin xr[k] = M'($urandom); xi[k] = M'($urandom); end
      foreach (wr[k]) begin wr[k] = {1'b1, (M - 1)'(0)}; wi[k] = {1'b1, (M - 1)'(0)}; end
      run_op(xr, xi, wr, wi);
      sr = longint'(xr[0]) + xr[1] + xr[2] + xr[3];
      si = longint'(xi[0]) + xi[1] + xi[2] + xi[3];
      cr = longint'(xr[0]) - xr[1] + xr[2] - xr[3];
      ci = longint'(xi[0]) - xi[1] + xi[2] - xi[3];
      check(y_re[0], wrapm(sr, M), "dft4 A' re");
      check(y_im[0], wrapm(si, M), "dft4 A' im");
      check(y_re[2], wrapm(cr, M), "dft4 C' re");
      check(y_im[2], wrapm(ci, M), "dft4 C' im");
      n_dft4++;
    end

    $display("mechanisms: ops=%0d extended_carry=%0d borrow=%0d wrap=%0d j_step=%0d restart=%0d dft4=%0d",
             n_ops, n_ext_carry, n_borrow, n_wrap, n_jstep, n_restart, n_dft4);
    checks++; if (n_ext_carry == 0) begin failures++; $display("FAIL extended carry never seen"); end
    checks++; if (n_borrow    == 0) begin failures++; $display("FAIL borrow never seen"); end
    checks++; if (n_wrap      == 0) begin failures++; $display("FAIL wraparound never seen"); end
    checks++; if (n_jstep     <  n_ops) begin failures++; $display("FAIL j step missing"); end
    checks++; if (n_restart   == 0) begin failures++; $display("FAIL restart never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
