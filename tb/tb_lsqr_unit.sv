// tb_lsqr_unit: self-checking test of the least-squares coefficient unit.
//
// Random eigenvalues, a random unit eigenvector v1 (v2 = v1 turned by 90
// degrees) and a random r are applied; the expected coefficients
// beta = sum_i v_i (v_i . r) / lambda_i are evaluated in real arithmetic
// from the same fixed-point eigenvectors, with components whose eigenvalue
// is below 145 left out. Checks: beta to 4 LSB of the FRAC-bit format,
// the number of components used, and the cycles from start to done.
module tb_lsqr_unit;
  import pca_pkg::*;

  logic clk = 0, rst = 1, start = 0, busy, done;
  logic [LW-1:0] lambda1, lambda2;
  logic signed [VW-1:0] v1x, v1y, v2x, v2y;
  logic signed [GW-1:0] r1, r2;
  logic [1:0] comps;
  logic signed [BW-1:0] beta1, beta2;
  int checks = 0, failures = 0;

  lsqr_unit dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real fabs(input real x); return x < 0 ? -x : x; endfunction

  task automatic run(input longint l1, input longint l2, input real ang,
                     input longint x1, input longint x2, input string tag);
    real one, ax, ay, bx, by, p1, p2, e1, e2;
    int cyc, ncomp;
    one = real'(64'd1 << VF);
    @(negedge clk);
    lambda1 = LW'(l1); lambda2 = LW'(l2);
    v1x = VW'(longint'($rtoi($cos(ang) * one)));
    v1y = VW'(longint'($rtoi($sin(ang) * one)));
    v2x = -v1y; v2y = v1x;
    r1 = GW'(x1); r2 = GW'(x2);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done && cyc < 2000) begin @(negedge clk); cyc++; end
    check(cyc < 300, $sformatf("%s: latency %0d", tag, cyc));
    ax = real'(v1x) / one; ay = real'(v1y) / one;
    bx = real'(v2x) / one; by = real'(v2y) / one;
    p1 = ax * real'(x1) + ay * real'(x2);
    p2 = bx * real'(x1) + by * real'(x2);
    ncomp = (l1 < 145) ? 0 : (l2 < 145) ? 1 : 2;
    e1 = 0; e2 = 0;
    if (ncomp >= 1) begin e1 += ax * p1 / real'(l1); e2 += ay * p1 / real'(l1); end
    if (ncomp == 2) begin e1 += bx * p2 / real'(l2); e2 += by * p2 / real'(l2); end
    e1 *= real'(64'd1 << FRAC); e2 *= real'(64'd1 << FRAC);
    check(comps == 2'(ncomp), $sformatf("%s: comps %0d exp %0d", tag, comps, ncomp));
    check(fabs(real'(beta1) - e1) <= 4.0, $sformatf("%s: beta1 %0d exp %f", tag, beta1, e1));
    check(fabs(real'(beta2) - e2) <= 4.0, $sformatf("%s: beta2 %0d exp %f", tag, beta2, e2));
  endtask

  initial begin
    lambda1 = '0; lambda2 = '0; v1x = '0; v1y = '0; v2x = '0; v2y = '0; r1 = '0; r2 = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    run(1000, 500, 0.0, 2000, -500, "axes");
    run(100, 50, 0.3, 2000, -500, "no component");
    run(100000, 100, 0.7, 300000, 200000, "one component");
    for (int n = 0; n < 60; n++) begin
      longint l1, l2, x1, x2;
      real ang;
      l2 = longint'($urandom_range(200, 1 << 30));
      l1 = l2 + longint'($urandom) * longint'($urandom_range(1, 64));
      ang = real'($urandom_range(0, 62831)) / 10000.0;
      // r consistent with a fit of moderate size: r = G beta, |beta| < 4
      x1 = longint'($rtoi(real'(l1) * ($cos(ang) * 1.7) + real'(l2) * (-$sin(ang) * 0.9)));
      x2 = longint'($rtoi(real'(l1) * ($sin(ang) * 1.7) + real'(l2) * ($cos(ang) * 0.9)));
      run(l1, l2, ang, x1, x2, $sformatf("random %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
