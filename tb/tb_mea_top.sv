// tb_mea_top: end-to-end test of both designs at their default sizes.
//
// MEA digital core: the registers of the setting words are configured over
// SPI with every op-code, read back over miso, and two frames of the
// transmitter are checked word by word (settings reported back by
// behavioural analog blocks, data words by bus), including a stop and
// restart of the transmitter.
// Artifact remover: four blocks of ten channels at 30 kS/s on a 10 MHz
// clock: a recorded-looking block with a spike on channel 7, a block whose
// channels are exact multiples of one pulse (the second principal component
// vanishes), a silent block (no component kept) and a second recorded block,
// then a sample stream too fast to keep up with. Each mechanism (SPI op-codes,
// auto-increment, frame sync and wrap, transmitter restart, both buffer
// banks, two/one/no principal components, overflow) is counted and must
// occur at least once.
module tb_mea_top;
  import mea_pkg::*;
  import pca_pkg::*;

  logic spi_clk = 0, spi_rst = 0, ssel = 0, mosi = 0, miso;
  logic tx_clk = 0, tx_rst = 1, tx_enbl = 0, tx_frm_sync;
  logic [TX_W-1:0] tx_data_out, data_bus_n, data_bus_s, data_bus_e, data_bus_w;
  logic [CNT_W-1:0] counter;
  logic [DATA_W-1:0] cfg [1024];
  logic pca_clk = 0, pca_rst = 1, pca_in_valid = 0;
  sample_t pca_in_sample [N_CH];
  logic pca_out_valid, pca_overflow, pca_block_start, pca_block_end;
  logic [$clog2(N_CH)-1:0] pca_out_ch;
  logic [$clog2(N_SAMP)-1:0] pca_out_idx;
  sample_t pca_out_sample;
  logic [1:0] pca_out_comps;
  logic [31:0] pca_block_cycles;

  int checks = 0, failures = 0;
  logic [7:0] ref_mem [1024];

  mea_top dut (.*);

  always #4 tx_clk = ~tx_clk;
  always #50 pca_clk = ~pca_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // ---------------- mechanism counters
  int n_op [4];
  int n_inc = 0, n_sync = 0, n_wrap = 0, n_restart = 0, n_bank [2];
  int n_comps [3];
  int n_over = 0;

  always @(posedge spi_clk) begin
    if (dut.u_core.wrt && dut.u_core.u_spi.op == OP_WRITE_DATA_INC) n_inc++;
    if (dut.u_core.u_spi.last) n_op[dut.u_core.u_spi.op]++;
  end
  always @(posedge tx_clk) begin
    if (tx_frm_sync) n_sync++;
    if (tx_enbl && counter == CNT_W'(FRAME_WORDS - 1)) n_wrap++;
  end

  // ---------------- SPI
  task automatic send(input logic [1:0] op, input logic [9:0] pl, output logic [7:0] rx);
    logic [11:0] w;
    w = {op, pl};
    ssel = 0;
    for (int i = 11; i >= 0; i--) begin
      mosi = w[i];
      #20;
      if (i >= 4) rx[i-4] = miso;
      spi_clk = 1; #25; spi_clk = 0; #5;
    end
    #20 ssel = 1; #30;
  endtask

  function automatic logic [9:0] bus_word(input int w, input int bus);
    if (w < 50) return {2'b00, cfg[w]};
    return {2'(bus), 8'(w)};
  endfunction
  assign data_bus_n = bus_word(int'(counter), 0);
  assign data_bus_s = bus_word(int'(counter), 1);
  assign data_bus_e = bus_word(int'(counter), 2);
  assign data_bus_w = bus_word(int'(counter), 3);

  function automatic logic [9:0] exp_word(input int w);
    bit ns;
    int bus;
    ns = (w >= 10 && w <= 29) || (w >= 82 && w <= 1105);
    bus = ns ? (w % 2 == 0 ? 0 : 1) : (w % 2 == 0 ? 3 : 2);
    if (w < 50) return {2'b00, ref_mem[w]};
    return {2'(bus), 8'(w)};
  endfunction

  logic [7:0] rx;
  bit core_done = 0;
  initial begin : core_test
    for (int i = 0; i < 1024; i++) ref_mem[i] = 8'h00;
    #5 ssel = 1; #5 spi_rst = 1; #100 spi_rst = 0; tx_rst = 0; #100;
    send(2'b01, 10'd0, rx);
    for (int i = 0; i < 40; i++) begin
      ref_mem[i] = 8'($urandom);
      send(2'b10, {2'b00, ref_mem[i]}, rx);
    end
    for (int i = 40; i < 50; i++) begin
      ref_mem[i] = 8'($urandom);
      send(2'b01, 10'(i), rx);
      send(2'b00, {2'b00, ref_mem[i]}, rx);
    end
    send(2'b11, 10'd0, rx);
    for (int i = 1; i <= 50; i++) begin
      send(2'b11, 10'(i % 50), rx);
      check(rx == ref_mem[i-1], $sformatf("read-back %0d", i - 1));
    end
    for (int i = 0; i < 1024; i++) check(cfg[i] == ref_mem[i], $sformatf("cfg[%0d]", i));
    @(negedge tx_clk) tx_enbl = 1;
    @(negedge tx_clk);
    for (int c = 0; c < 1170 + 300; c++) begin
      check(tx_frm_sync == (c % 1170 == 0), $sformatf("sync at %0d", c));
      check(tx_data_out == exp_word(c % 1170), $sformatf("word %0d", c % 1170));
      @(negedge tx_clk);
    end
    tx_enbl = 0;
    @(negedge tx_clk);
    tx_enbl = 1;
    n_restart++;
    @(negedge tx_clk);
    for (int c = 0; c < 1170; c++) begin
      check(tx_frm_sync == (c == 0), $sformatf("sync after restart at %0d", c));
      check(tx_data_out == exp_word(c), $sformatf("word after restart %0d", c));
      @(negedge tx_clk);
    end
    core_done = 1;
  end

  // ---------------- artifact remover
  localparam int NB = 4;
  localparam int PERIOD = 333;
  int data [NB][N_SAMP][N_CH];
  int exp_comps [NB];

  function automatic int clamp16(input real v);
    int i;
    i = $rtoi(v < 0 ? v - 0.5 : v + 0.5);
    if (i > 32767) i = 32767;
    if (i < -32768) i = -32768;
    return i;
  endfunction
  function automatic real pulse(input int t);
    if (t >= 20 && t < 30) return 1.0;
    if (t >= 30 && t < 40) return -1.0;
    if (t >= 40) return 0.3 * $exp(-real'(t - 40) / 12.0);
    return 0.0;
  endfunction
  function automatic real spike(input int t, input int t0);
    real x;
    x = real'(t - t0);
    if (x < 0 || x > 12) return 0.0;
    return -$exp(-x / 3.0);
  endfunction

  task automatic make_data();
    real gain, v;
    int dst;
    for (int b = 0; b < NB; b++)
      for (int k = 0; k < N_SAMP; k++)
        for (int c = 0; c < N_CH; c++) begin
          dst = (c > 2) ? c - 2 : 2 - c;
          gain = 9000.0 * $pow(real'(dst) + 1.0, -0.8) + 300.0;
          case (b)
            1: v = real'(c % 4 + 1) * $rtoi(2000.0 * pulse(k));   // exact multiples
            2: v = 0.0;                                           // silent
            default: begin
              v = gain * pulse(k) + 1200.0 * (1.0 + 0.1 * c) * $exp(-real'(k) / 50.0)
                  + real'($signed($urandom_range(0, 16)) - 8);
              if (c == 7) v += 900.0 * (spike(k, 33) + spike(k, 100));
            end
          endcase
          data[b][k][c] = clamp16(v);
        end
    exp_comps[0] = 2; exp_comps[1] = 1; exp_comps[2] = 0; exp_comps[3] = 2;
  endtask

  bit fast = 0;
  initial begin : stream
    for (int c = 0; c < N_CH; c++) pca_in_sample[c] = '0;
    make_data();
    repeat (5) @(posedge pca_clk);
    pca_rst <= 0;
    for (int b = 0; b < NB; b++)
      for (int k = 0; k < N_SAMP; k++) begin
        repeat (PERIOD - 1) @(posedge pca_clk);
        for (int c = 0; c < N_CH; c++) pca_in_sample[c] <= sample_t'(data[b][k][c]);
        pca_in_valid <= 1;
        @(posedge pca_clk);
        pca_in_valid <= 0;
      end
  end

  int nout = 0, nblk = 0, blk, oc, ok_;
  always @(posedge pca_clk) begin
    if (!pca_rst && pca_out_valid && !fast) begin
      blk = nout / (N_CH * N_SAMP);
      oc = int'(pca_out_ch);
      ok_ = int'(pca_out_idx);
      check(oc == (nout / N_SAMP) % N_CH && ok_ == nout % N_SAMP, "output order");
      if (ok_ == 0) begin
        check(int'(pca_out_comps) == exp_comps[blk], $sformatf("blk %0d ch %0d comps %0d", blk, oc, pca_out_comps));
        n_comps[pca_out_comps]++;
      end
      case (blk)
        1: check(pca_out_sample <= 2 && pca_out_sample >= -2, $sformatf("collinear residual %0d", pca_out_sample));
        2: check(pca_out_sample == 0, "silent block");
        default: begin
          if (oc == 7 && ok_ == 33) check(pca_out_sample < -600, $sformatf("spike kept %0d", pca_out_sample));
          if (oc == 0 && ok_ >= 20 && ok_ < 40)
            check(pca_out_sample < 300 && pca_out_sample > -300, $sformatf("pulse removed %0d", pca_out_sample));
        end
      endcase
      nout++;
    end
    if (!pca_rst && pca_block_end && !fast) begin
      n_bank[dut.u_pca.rel_bank]++;
      nblk++;
      check(pca_block_cycles < 48340, $sformatf("block cycles %0d", pca_block_cycles));
    end
    if (!pca_rst && pca_overflow) n_over++;
  end

  initial begin : finish
    wait (nblk == NB && core_done);
    check(nout == NB * N_CH * N_SAMP, "all samples out");
    check(n_over == 0, "no overflow at 30 kS/s");
    fast = 1;
    for (int k = 0; k < 3 * N_SAMP; k++) begin
      repeat (9) @(posedge pca_clk);
      pca_in_valid <= 1;
      @(posedge pca_clk);
      pca_in_valid <= 0;
    end
    $display("mechanisms: write %0d, address %0d, write+inc %0d, read %0d, syncs %0d, wraps %0d, restarts %0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_sync, n_wrap, n_restart);
    $display("mechanisms: bank0 %0d, bank1 %0d, comps2 %0d, comps1 %0d, comps0 %0d, overflow %0d",
             n_bank[0], n_bank[1], n_comps[2], n_comps[1], n_comps[0], n_over);
    for (int i = 0; i < 4; i++) check(n_op[i] > 0, $sformatf("op-code %0d used", i));
    check(n_inc > 0, "auto-increment");
    check(n_sync > 1 && n_wrap > 0 && n_restart > 0, "frame sync, wrap, restart");
    check(n_bank[0] > 0 && n_bank[1] > 0, "both buffer banks");
    check(n_comps[2] > 0 && n_comps[1] > 0 && n_comps[0] > 0, "two, one and no components");
    check(n_over > 0, "overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NB * N_SAMP * PERIOD + 100000) @(posedge pca_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
