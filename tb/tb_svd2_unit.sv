// tb_svd2_unit: self-checking test of the 2x2 eigen/singular value unit.
//
// G = A^T A is formed here from random 145 x 2 sample blocks (correlated,
// uncorrelated, scaled and degenerate cases). The expected eigenvalues come
// from the closed form evaluated in real arithmetic; the eigenvector is
// checked through G v1 = lambda1 v1 and |v1| = 1, and v2 against v1 turned
// by 90 degrees. The cycles from start to done are checked against 360.
module tb_svd2_unit;
  import pca_pkg::*;

  logic clk = 0, rst = 1, start = 0, busy, done;
  logic [GW-1:0] g11, g22;
  logic signed [GW-1:0] g12;
  logic [LW-1:0] lambda1, lambda2;
  logic [LW/2:0] sigma1, sigma2;
  logic signed [VW-1:0] v1x, v1y, v2x, v2y;
  int checks = 0, failures = 0;

  svd2_unit dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real fabs(input real x); return x < 0 ? -x : x; endfunction

  task automatic run(input longint s11, input longint s12, input longint s22, input string tag);
    real t, d, s, l1, l2, x, y, rx, ry, nrm;
    int cyc;
    @(negedge clk);
    g11 = GW'(s11); g12 = GW'(s12); g22 = GW'(s22);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done && cyc < 2000) begin @(negedge clk); cyc++; end
    check(cyc < 360, $sformatf("%s: latency %0d", tag, cyc));
    t = real'(s11) + real'(s22);
    d = real'(s11) - real'(s22);
    s = $sqrt(d * d + 4.0 * real'(s12) * real'(s12));
    l1 = (t + s) / 2.0; l2 = (t - s) / 2.0;
    check(fabs(real'(lambda1) - l1) <= 1.5, $sformatf("%s: lambda1 %0d exp %f", tag, lambda1, l1));
    check(fabs(real'(lambda2) - l2) <= 1.5, $sformatf("%s: lambda2 %0d exp %f", tag, lambda2, l2));
    check(fabs(real'(sigma1) - $sqrt(l1)) <= 1.0, $sformatf("%s: sigma1", tag));
    check(fabs(real'(sigma2) - $sqrt(l2 > 0 ? l2 : 0.0)) <= 1.0, $sformatf("%s: sigma2", tag));
    x = real'(v1x) / real'(64'd1 << VF);
    y = real'(v1y) / real'(64'd1 << VF);
    nrm = $sqrt(x * x + y * y);
    check(fabs(nrm - 1.0) < 1e-8, $sformatf("%s: |v1| = %f", tag, nrm));
    if (l1 > 0) begin
      rx = (real'(s11) * x + real'(s12) * y) / l1;
      ry = (real'(s12) * x + real'(s22) * y) / l1;
      check(fabs(rx - x) < 1e-7 && fabs(ry - y) < 1e-7,
            $sformatf("%s: G v1 != lambda1 v1 (%e %e)", tag, rx - x, ry - y));
    end
    check(v2x == -v1y && v2y == v1x, $sformatf("%s: v2", tag));
  endtask

  task automatic block(input int ka, input int kb, input int amp, input int noise, input string tag);
    longint s11 = 0, s12 = 0, s22 = 0;
    int a, b, base;
    for (int k = 0; k < 145; k++) begin
      base = $signed($urandom_range(0, 2 * amp)) - amp;
      a = (base * ka) / 8 + $signed($urandom_range(0, 2 * noise)) - noise;
      b = (base * kb) / 8 + $signed($urandom_range(0, 2 * noise)) - noise;
      if (a > 32767) a = 32767; if (a < -32768) a = -32768;
      if (b > 32767) b = 32767; if (b < -32768) b = -32768;
      s11 += longint'(a) * a; s12 += longint'(a) * b; s22 += longint'(b) * b;
    end
    run(s11, s12, s22, tag);
  endtask

  initial begin
    g11 = '0; g12 = '0; g22 = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    run(0, 0, 0, "zero");
    run(1000, 0, 1000, "scaled identity");
    run(5000, 0, 200, "diagonal g11>g22");
    run(200, 0, 5000, "diagonal g11<g22");
    run(1000, -1000, 1000, "singular");
    run(longint'(145) * 32768 * 32768, -longint'(145) * 32768 * 32767, longint'(145) * 32767 * 32767, "full scale");
    for (int n = 0; n < 40; n++)
      block($urandom_range(1, 8), $signed($urandom_range(0, 16)) - 8, $urandom_range(100, 30000),
            $urandom_range(0, 200), $sformatf("random %0d", n));
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
