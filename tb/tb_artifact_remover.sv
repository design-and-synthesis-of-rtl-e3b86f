// tb_artifact_remover: end-to-end test of the PCA artifact remover.
//
// Ten channels are synthesised at 30 kS/s (one time point every 333 cycles
// of the 10 MHz clock): a biphasic stimulation pulse with a decaying tail,
// scaled per channel by a power law of the distance to the stimulating
// electrode, a second slower artifact component with other weights, small
// noise, and two spikes on channel 7 (one inside the pulse) that also leak
// into channels 6 and 8. For every block the expected cleaned samples are
// computed here in real arithmetic: G = A^T A and r = A^T y over the block,
// the least-squares projection of y onto the principal components of the
// reference channels c+2 and c+3, y minus the rounded template. Checks:
// every output sample to 2 LSB, channel/index order, the spike kept on
// channel 7, the pulse removed on channel 0, block processing within the
// 145-sample interval (48,340 cycles), and, with a faster sample stream at
// the end, that dropped time points are reported as overflow.
module tb_artifact_remover;
  import pca_pkg::*;

  localparam int NB = 3;       // blocks checked
  localparam int PERIOD = 333; // cycles per time point, 10 MHz / 30 kS/s

  logic clk = 0, rst = 1, in_valid = 0;
  sample_t in_sample [N_CH];
  logic out_valid, overflow, block_start, block_end;
  logic [$clog2(N_CH)-1:0] out_ch;
  logic [$clog2(N_SAMP)-1:0] out_idx;
  sample_t out_sample;
  logic [1:0] out_comps;
  logic [31:0] block_cycles;
  int checks = 0, failures = 0;

  artifact_remover dut (.*);

  always #50 clk = ~clk;   // 10 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic real fabs(input real x); return x < 0 ? -x : x; endfunction

  int data [NB][N_SAMP][N_CH];
  int expv [NB][N_CH][N_SAMP];
  int ecomps [NB][N_CH];

  function automatic int clamp16(input real v);
    int i;
    i = $rtoi(v < 0 ? v - 0.5 : v + 0.5);
    if (i > 32767) i = 32767;
    if (i < -32768) i = -32768;
    return i;
  endfunction

  // artifact shapes and spike
  function automatic real pulse(input int t);
    if (t >= 20 && t < 30) return 1.0;
    if (t >= 30 && t < 40) return -1.0;
    if (t >= 40) return 0.3 * $exp(-real'(t - 40) / 12.0);
    return 0.0;
  endfunction
  function automatic real slow(input int t);
    if (t >= 20) return $exp(-real'(t - 20) / 40.0);
    return 0.0;
  endfunction
  function automatic real spike(input int t, input int t0);
    real x;
    x = real'(t - t0);
    if (x < 0 || x > 12) return 0.0;
    return -1.0 * $exp(-x / 3.0) + 0.4 * $exp(-x / 8.0) * (x / 12.0);
  endfunction

  task automatic make_data();
    real gain, g2, v;
    int dst;
    for (int b = 0; b < NB; b++)
      for (int k = 0; k < N_SAMP; k++)
        for (int c = 0; c < N_CH; c++) begin
          dst = (c > 2) ? c - 2 : 2 - c;          // stimulation near channel 2
          gain = 9000.0 * $pow(real'(dst) + 1.0, -0.8) + 300.0;  // y = a x^b + c
          g2   = 1500.0 * (1.0 + 0.1 * real'(c)) * (b == 1 ? -1.0 : 1.0);
          v = gain * pulse(k) + g2 * slow(k) + real'($signed($urandom_range(0, 16)) - 8);
          if (c == 7) v += 900.0 * (spike(k, 33) + spike(k, 100));
          if (c == 6 || c == 8) v += 250.0 * (spike(k, 33) + spike(k, 100));
          data[b][k][c] = clamp16(v);
        end
  endtask

  task automatic make_expected();
    real g11, g12, g22, r1, r2, t, d, s, l1, l2, vx, vy, nrm, p, b1, b2, det, est;
    int ca, cb, e;
    for (int b = 0; b < NB; b++)
      for (int c = 0; c < N_CH; c++) begin
        ca = (c + 2) % N_CH; cb = (c + 3) % N_CH;
        g11 = 0; g12 = 0; g22 = 0; r1 = 0; r2 = 0;
        for (int k = 0; k < N_SAMP; k++) begin
          g11 += real'(data[b][k][ca]) * data[b][k][ca];
          g22 += real'(data[b][k][cb]) * data[b][k][cb];
          g12 += real'(data[b][k][ca]) * data[b][k][cb];
          r1  += real'(data[b][k][ca]) * data[b][k][c];
          r2  += real'(data[b][k][cb]) * data[b][k][c];
        end
        t = g11 + g22; d = g11 - g22;
        s = $sqrt(d * d + 4.0 * g12 * g12);
        l1 = (t + s) / 2.0; l2 = (t - s) / 2.0;
        if (l1 < 145.0) begin
          b1 = 0; b2 = 0; ecomps[b][c] = 0;
        end else if (l2 < 145.0) begin
          if (d >= 0) begin vx = l1 - g22; vy = g12; end else begin vx = g12; vy = l1 - g11; end
          nrm = $sqrt(vx * vx + vy * vy); vx /= nrm; vy /= nrm;
          p = (vx * r1 + vy * r2) / l1;
          b1 = vx * p; b2 = vy * p; ecomps[b][c] = 1;
        end else begin
          det = g11 * g22 - g12 * g12;
          b1 = (g22 * r1 - g12 * r2) / det;
          b2 = (g11 * r2 - g12 * r1) / det;
          ecomps[b][c] = 2;
        end
        for (int k = 0; k < N_SAMP; k++) begin
          est = b1 * data[b][k][ca] + b2 * data[b][k][cb];
          expv[b][c][k] = clamp16(real'(data[b][k][c]) - est);
        end
      end
  endtask

  // stimulus
  int period = PERIOD;
  initial begin
    for (int c = 0; c < N_CH; c++) in_sample[c] = '0;
    make_data();
    make_expected();
    repeat (5) @(posedge clk);
    rst <= 0;
    for (int b = 0; b < NB; b++)
      for (int k = 0; k < N_SAMP; k++) begin
        repeat (period - 1) @(posedge clk);
        for (int c = 0; c < N_CH; c++) in_sample[c] <= sample_t'(data[b][k][c]);
        in_valid <= 1;
        @(posedge clk);
        in_valid <= 0;
      end
  end

  // output checking
  int nout = 0, blk, ch_exp, idx_exp, spike_out, pulse_res, nblocks = 0, nover = 0;
  int max_cycles = 0;
  bit fast_phase = 0;
  always @(posedge clk) begin
    if (!rst && out_valid && !fast_phase) begin
      blk = nout / (N_CH * N_SAMP);
      ch_exp = (nout / N_SAMP) % N_CH;
      idx_exp = nout % N_SAMP;
      check(int'(out_ch) == ch_exp && int'(out_idx) == idx_exp,
            $sformatf("order: got ch %0d idx %0d exp %0d %0d", out_ch, out_idx, ch_exp, idx_exp));
      if (blk < NB) begin
        e_check: begin
          int d;
          d = int'(out_sample) - expv[blk][ch_exp][idx_exp];
          check(d <= 2 && d >= -2,
                $sformatf("blk %0d ch %0d k %0d: %0d exp %0d", blk, ch_exp, idx_exp,
                          out_sample, expv[blk][ch_exp][idx_exp]));
        end
        if (idx_exp == 0)
          check(out_comps == 2'(ecomps[blk][ch_exp]), $sformatf("comps blk %0d ch %0d", blk, ch_exp));
        if (ch_exp == 7 && idx_exp == 33) spike_out = int'(out_sample);
        if (ch_exp == 7 && idx_exp == 33) check(spike_out < -600, $sformatf("spike kept: %0d", spike_out));
        if (ch_exp == 0 && idx_exp >= 20 && idx_exp < 40)
          check(int'(out_sample) < 300 && int'(out_sample) > -300,
                $sformatf("pulse removed on ch 0: %0d (raw %0d)", out_sample, data[blk][idx_exp][0]));
      end
      nout++;
    end
    if (!rst && block_end && !fast_phase) begin
      nblocks++;
      if (int'(block_cycles) > max_cycles) max_cycles = int'(block_cycles);
      check(block_cycles < 48340, $sformatf("block took %0d cycles", block_cycles));
    end
    if (!rst && overflow) nover++;
  end

  initial begin
    wait (nblocks == NB);
    check(nout == NB * N_CH * N_SAMP, "all samples out");
    check(nover == 0, "no overflow at 30 kS/s");
    $display("block processing: %0d cycles (budget 48340)", max_cycles);
    // overload: a time point every 10 cycles
    fast_phase = 1;
    repeat (10) @(posedge clk);
    for (int k = 0; k < 4 * N_SAMP; k++) begin
      repeat (9) @(posedge clk);
      in_valid <= 1;
      @(posedge clk);
      in_valid <= 0;
    end
    check(nover > 0, "overflow reported when samples arrive too fast");
    $display("overflow pulses: %0d", nover);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NB * N_SAMP * PERIOD + 200000) @(posedge clk);
    failures++;
    $display("watchdog expired (blocks %0d, outputs %0d)", nblocks, nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
