// tb_tx_framer: self-checking test of the recorded-data transmitter.
//
// Behavioural analog blocks drive each bus with a value computed from the
// word counter and the bus identity, so every word of the frame says which
// bus it came from. The test enables the transmitter for two full frames and
// a half, and checks each output word against the frame layout worked out
// here from the word ranges (settings 0-49, impedance 50-81, voltage
// recording 82-1105, voltage clamp 1106-1169), the frame-sync pulse on word
// 0 only, the 1170-cycle frame period and the restart after tx_enbl drops.
module tb_tx_framer;
  import mea_pkg::*;

  logic tx_clk = 0, tx_rst = 1, tx_enbl = 0;
  logic tx_frm_sync;
  logic [TX_W-1:0] tx_data_out, data_bus_n, data_bus_s, data_bus_e, data_bus_w;
  logic [CNT_W-1:0] counter;
  int checks = 0, failures = 0;

  tx_framer dut (.*);

  always #5 tx_clk = ~tx_clk;

  // bus value: two bits of bus id, eight bits of the word number
  assign data_bus_n = {2'd0, counter[7:0]};
  assign data_bus_s = {2'd1, counter[7:0]};
  assign data_bus_e = {2'd2, counter[7:0]};
  assign data_bus_w = {2'd3, counter[7:0]};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [1:0] exp_bus(input int w);
    bit ns;
    ns = (w >= 10 && w <= 29) || (w >= 82 && w <= 1105);
    if (ns) return (w % 2 == 0) ? 2'd0 : 2'd1;
    else    return (w % 2 == 0) ? 2'd3 : 2'd2;
  endfunction

  int word, syncs, last_sync;
  initial begin
    repeat (3) @(negedge tx_clk);
    tx_rst = 0;
    @(negedge tx_clk);
    check(tx_frm_sync == 0 && tx_data_out == 0 && counter == 0, "idle outputs");
    tx_enbl = 1;
    @(negedge tx_clk);
    syncs = 0; last_sync = -1;
    for (int c = 0; c < 3 * 1170 - 500; c++) begin
      word = c % 1170;
      check(tx_frm_sync == (word == 0), $sformatf("sync at word %0d", word));
      check(tx_data_out == {exp_bus(word), 8'(word)},
            $sformatf("word %0d: %h exp %h", word, tx_data_out, {exp_bus(word), 8'(word)}));
      if (tx_frm_sync) begin
        if (last_sync >= 0) check(c - last_sync == 1170, "frame period");
        last_sync = c; syncs++;
      end
      @(negedge tx_clk);
    end
    check(syncs == 3, "three frames started");
    tx_enbl = 0;
    @(negedge tx_clk);
    check(counter == 0 && tx_frm_sync == 0, "stop clears counter");
    tx_enbl = 1;
    @(negedge tx_clk);
    check(tx_frm_sync == 1 && tx_data_out == {2'd3, 8'd0}, "restart at word 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge tx_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
