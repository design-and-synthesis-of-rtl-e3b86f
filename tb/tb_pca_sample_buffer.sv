// tb_pca_sample_buffer: self-checking test of the double-buffered block
// memory. Time points with known contents are written; the test checks the
// full flags and block_done after every 145 points, reads both banks back
// (one cycle read latency), checks that writing goes on in the other bank,
// that points arriving while both banks are full are dropped with an
// overflow pulse, and that a released bank is filled again.
module tb_pca_sample_buffer;
  import pca_pkg::*;

  logic clk = 0, rst = 1, in_valid = 0;
  sample_t in_sample [N_CH];
  logic [1:0] full;
  logic block_done, overflow, release_bank_en = 0, release_bank = 0, rd_bank = 0;
  logic [$clog2(N_SAMP)-1:0] rd_addr = '0;
  sample_t rd_data [N_CH];
  int checks = 0, failures = 0;
  int n_done = 0, n_over = 0;

  pca_sample_buffer dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (!rst && block_done) n_done++;
    if (!rst && overflow) n_over++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic sample_t val(input int blk, input int k, input int c);
    return sample_t'(blk * 4099 + k * 37 + c * 1001 - 20000);
  endfunction

  task automatic push(input int blk, input int k);
    @(negedge clk);
    for (int c = 0; c < N_CH; c++) in_sample[c] = val(blk, k, c);
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic read_bank(input int bank, input int blk);
    for (int k = 0; k < N_SAMP; k++) begin
      @(negedge clk);
      rd_bank = 1'(bank); rd_addr = $bits(rd_addr)'(k);
      @(negedge clk);
      for (int c = 0; c < N_CH; c++)
        check(rd_data[c] == val(blk, k, c), $sformatf("bank %0d k %0d c %0d", bank, k, c));
    end
  endtask

  initial begin
    for (int c = 0; c < N_CH; c++) in_sample[c] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int k = 0; k < N_SAMP; k++) push(0, k);
    @(negedge clk);
    check(full == 2'b01 && n_done == 1, $sformatf("bank 0 full %b %0d", full, n_done));
    for (int k = 0; k < N_SAMP; k++) push(1, k);
    @(negedge clk);
    check(full == 2'b11 && n_done == 2, "bank 1 full");
    push(9, 0); push(9, 1);
    @(negedge clk);
    check(n_over == 2, "two points dropped");
    read_bank(0, 0);
    read_bank(1, 1);
    @(negedge clk); release_bank_en = 1; release_bank = 0;
    @(negedge clk); release_bank_en = 0;
    check(full == 2'b10, "bank 0 released");
    for (int k = 0; k < N_SAMP; k++) push(2, k);
    @(negedge clk);
    check(full == 2'b11 && n_done == 3 && n_over == 2, "bank 0 refilled");
    read_bank(0, 2);
    read_bank(1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
