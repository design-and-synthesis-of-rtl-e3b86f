// tb_workload_1s: one second of ten-channel recording through the artifact
// remover at its default size.
//
// 30,000 time points (207 blocks of 145) at 30 kS/s on a 10 MHz clock. A
// biphasic stimulation pulse recurs at a varying position in each block,
// scaled per channel by a power law of the distance to the stimulating
// electrode, with a slower second artifact component and noise. Spikes on
// channel 7 (leaking into 6 and 8) fall at random times, some inside a
// pulse. Every cleaned sample is compared, to within 2 LSB, with a
// real-arithmetic model of the same algorithm computed here block by block
// (least-squares projection of each channel onto the principal components of
// channels c+2 and c+3). Also checked: no overflow, every block processed in
// less than the 48,340-cycle block interval, and spikes kept on channel 7.
module tb_workload_1s;
  import pca_pkg::*;

  localparam int NB = 207;
  localparam int PERIOD = 333;

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

  always #50 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic int clamp16(input real v);
    int i;
    i = $rtoi(v < 0 ? v - 0.5 : v + 0.5);
    if (i > 32767) i = 32767;
    if (i < -32768) i = -32768;
    return i;
  endfunction
  function automatic real pulse(input int t);
    if (t < 0) return 0.0;
    if (t < 10) return 1.0;
    if (t < 20) return -1.0;
    return 0.3 * $exp(-real'(t - 20) / 12.0);
  endfunction
  function automatic real spike(input int t);
    if (t < 0 || t > 12) return 0.0;
    return -$exp(-real'(t) / 3.0);
  endfunction

  // two blocks of data and expected output in flight (double buffering)
  int data [2][N_SAMP][N_CH];
  int expv [2][N_CH][N_SAMP];
  int spk  [2];

  task automatic make_block(input int b);
    real gain, v;
    int dst, p0, s0, slot;
    slot = b % 2;
    p0 = $urandom_range(0, 100);
    s0 = (b % 3 == 0) ? p0 + $urandom_range(0, 20) : $urandom_range(0, 130);
    spk[slot] = s0;
    for (int k = 0; k < N_SAMP; k++)
      for (int c = 0; c < N_CH; c++) begin
        dst = (c > 2) ? c - 2 : 2 - c;
        gain = 9000.0 * $pow(real'(dst) + 1.0, -0.8) + 300.0;
        v = gain * pulse(k - p0) + 1200.0 * (1.0 + 0.1 * c) * $exp(-real'(k) / 60.0)
            + real'($signed($urandom_range(0, 16)) - 8);
        if (c == 7) v += 900.0 * spike(k - s0);
        if (c == 6 || c == 8) v += 250.0 * spike(k - s0);
        data[slot][k][c] = clamp16(v);
      end
  endtask

  task automatic make_expected(input int slot);
    real g11, g12, g22, r1, r2, t, d, s, l1, l2, vx, vy, nrm, p, b1, b2, det, est;
    int ca, cb;
    for (int c = 0; c < N_CH; c++) begin
      ca = (c + 2) % N_CH; cb = (c + 3) % N_CH;
      g11 = 0; g12 = 0; g22 = 0; r1 = 0; r2 = 0;
      for (int k = 0; k < N_SAMP; k++) begin
        g11 += real'(data[slot][k][ca]) * data[slot][k][ca];
        g22 += real'(data[slot][k][cb]) * data[slot][k][cb];
        g12 += real'(data[slot][k][ca]) * data[slot][k][cb];
        r1  += real'(data[slot][k][ca]) * data[slot][k][c];
        r2  += real'(data[slot][k][cb]) * data[slot][k][c];
      end
      t = g11 + g22; d = g11 - g22;
      s = $sqrt(d * d + 4.0 * g12 * g12);
      l1 = (t + s) / 2.0; l2 = (t - s) / 2.0;
      if (l1 < 145.0) begin
        b1 = 0; b2 = 0;
      end else if (l2 < 145.0) begin
        if (d >= 0) begin vx = l1 - g22; vy = g12; end else begin vx = g12; vy = l1 - g11; end
        nrm = $sqrt(vx * vx + vy * vy); vx /= nrm; vy /= nrm;
        p = (vx * r1 + vy * r2) / l1;
        b1 = vx * p; b2 = vy * p;
      end else begin
        det = g11 * g22 - g12 * g12;
        b1 = (g22 * r1 - g12 * r2) / det;
        b2 = (g11 * r2 - g12 * r1) / det;
      end
      for (int k = 0; k < N_SAMP; k++) begin
        est = b1 * data[slot][k][ca] + b2 * data[slot][k][cb];
        expv[slot][c][k] = clamp16(real'(data[slot][k][c]) - est);
      end
    end
  endtask

  int nout = 0, nblk = 0, nover = 0, max_cycles = 0, nspike_ok = 0, nspike = 0;

  initial begin
    for (int c = 0; c < N_CH; c++) in_sample[c] = '0;
    repeat (5) @(posedge clk);
    rst <= 0;
    for (int b = 0; b < NB; b++) begin
      // block b-2 has been processed long before block b starts arriving
      make_block(b);
      make_expected(b % 2);
      for (int k = 0; k < N_SAMP; k++) begin
        repeat (PERIOD - 1) @(posedge clk);
        for (int c = 0; c < N_CH; c++) in_sample[c] <= sample_t'(data[b % 2][k][c]);
        in_valid <= 1;
        @(posedge clk);
        in_valid <= 0;
      end
    end
  end

  int blk, oc, ok_, dd;
  always @(posedge clk) begin
    if (!rst && out_valid) begin
      blk = nout / (N_CH * N_SAMP);
      oc = int'(out_ch);
      ok_ = int'(out_idx);
      dd = int'(out_sample) - expv[blk % 2][oc][ok_];
      check(oc == (nout / N_SAMP) % N_CH && ok_ == nout % N_SAMP, "output order");
      check(dd <= 2 && dd >= -2, $sformatf("blk %0d ch %0d k %0d: %0d exp %0d", blk, oc, ok_,
                                           out_sample, expv[blk % 2][oc][ok_]));
      if (oc == 7 && ok_ == spk[blk % 2]) begin
        nspike++;
        if (out_sample < -600) nspike_ok++;
      end
      nout++;
    end
    if (!rst && block_end) begin
      nblk++;
      if (int'(block_cycles) > max_cycles) max_cycles = int'(block_cycles);
      check(block_cycles < 48340, "block within the sample interval");
    end
    if (!rst && overflow) nover++;
  end

  initial begin
    wait (nblk == NB);
    check(nout == NB * N_CH * N_SAMP, "all samples out");
    check(nover == 0, "no overflow");
    check(nspike == NB && nspike_ok > NB * 9 / 10, $sformatf("spikes kept: %0d of %0d", nspike_ok, nspike));
    $display("1 s of recording: %0d blocks, longest %0d cycles (budget 48340), spikes kept %0d of %0d",
             nblk, max_cycles, nspike_ok, nspike);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NB * N_SAMP * PERIOD + 100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
