// tb_mea_digital_core: self-checking test of the MEA digital core.
//
// Behavioural analog blocks report their settings in the setting words of
// the output frame: setting word w (0-49) carries register w of the
// register memory, and data words carry a code of the word number and the
// bus they came from. The test configures registers over SPI with all four
// op-codes (address, write with and without increment, read-back), checks
// cfg and the read-back bytes, then runs the transmitter and checks that the
// configuration written over SPI comes back in the setting words of the
// frame, that data words come from the right bus, and the frame sync.
module tb_mea_digital_core;
  import mea_pkg::*;

  logic spi_clk = 0, spi_rst = 0, ssel = 0, mosi = 0, miso;
  logic tx_clk = 0, tx_rst = 1, tx_enbl = 0, tx_frm_sync;
  logic [TX_W-1:0] tx_data_out, data_bus_n, data_bus_s, data_bus_e, data_bus_w;
  logic [CNT_W-1:0] counter;
  logic [DATA_W-1:0] cfg [1024];
  logic [7:0] ref_mem [1024];
  int checks = 0, failures = 0;

  mea_digital_core dut (.*);

  always #4 tx_clk = ~tx_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

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

  // behavioural analog blocks
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
  initial begin
    for (int i = 0; i < 1024; i++) ref_mem[i] = 8'h00;
    #5 ssel = 1; #5 spi_rst = 1; #100 spi_rst = 0; tx_rst = 0; #100;
    // settings 0..49 written in one burst with auto-increment
    send(2'b01, 10'd0, rx);
    for (int i = 0; i < 50; i++) begin
      ref_mem[i] = 8'($urandom);
      send(2'b10, {2'b00, ref_mem[i]}, rx);
    end
    // some registers further up, written without increment
    for (int n = 0; n < 20; n++) begin
      logic [9:0] a;
      a = 10'($urandom_range(50, 1023));
      ref_mem[a] = 8'($urandom);
      send(2'b01, a, rx);
      send(2'b00, {2'b00, ref_mem[a]}, rx);
    end
    for (int i = 0; i < 1024; i++) check(cfg[i] == ref_mem[i], $sformatf("cfg[%0d]", i));
    // read back the settings
    send(2'b11, 10'd0, rx);
    for (int i = 1; i <= 50; i++) begin
      send(2'b11, 10'(i), rx);
      check(rx == ref_mem[i-1], $sformatf("read-back %0d: %h exp %h", i - 1, rx, ref_mem[i-1]));
    end
    // transmit two frames
    @(negedge tx_clk) tx_enbl = 1;
    @(negedge tx_clk);
    for (int c = 0; c < 2 * 1170; c++) begin
      check(tx_frm_sync == (c % 1170 == 0), $sformatf("sync at %0d", c));
      check(tx_data_out == exp_word(c % 1170),
            $sformatf("word %0d: %h exp %h", c % 1170, tx_data_out, exp_word(c % 1170)));
      @(negedge tx_clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
