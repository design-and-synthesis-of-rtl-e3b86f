// tb_spi_slave: self-checking test of the SPI command interface.
//
// A register array in the testbench stands for the register memory: it is
// written when wrt is high on a rising spi_clk edge and answers rd with the
// addressed byte. The test sends each op-code (write address, write with and
// without increment, read), checks every write against a reference array
// kept by the testbench, reads registers back over miso and checks that a
// command aborted by raising ssel has no effect. spi_clk runs at 20 MHz.
module tb_spi_slave;
  import mea_pkg::*;

  logic spi_clk = 0, spi_rst = 0, ssel = 0, mosi = 0;
  logic miso, rd, wrt;
  logic [ADDR_W-1:0] addr;
  logic [DATA_W-1:0] dout, din;
  int checks = 0, failures = 0;

  logic [7:0] mem [1024];
  logic [7:0] ref_mem [1024];

  spi_slave dut (.*);

  assign din = rd ? mem[addr] : 8'h00;
  always_ff @(posedge spi_clk) if (wrt) mem[addr] <= dout;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Sends one 12-bit command, returns the byte seen on miso in the first
  // eight bit slots.
  task automatic send(input logic [1:0] op, input logic [9:0] pl,
                      output logic [7:0] rx);
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

  logic [7:0] rx;
  logic [9:0] a;
  int wr_count = 0;

  always @(posedge spi_clk) if (wrt) wr_count++;

  initial begin
    for (int i = 0; i < 1024; i++) begin mem[i] = 8'(i * 7 + 3); ref_mem[i] = 8'(i * 7 + 3); end
    #5 ssel = 1; #5 spi_rst = 1; #100 spi_rst = 0; #100;
    // write address, then three bytes with increment, then one without
    send(2'b01, 10'd300, rx);
    send(2'b10, 10'h0A5, rx); ref_mem[300] = 8'hA5;
    send(2'b10, 10'h05A, rx); ref_mem[301] = 8'h5A;
    send(2'b10, 10'h3C3, rx); ref_mem[302] = 8'hC3;   // bits 9:8 ignored
    send(2'b00, 10'h011, rx); ref_mem[303] = 8'h11;
    send(2'b00, 10'h022, rx); ref_mem[303] = 8'h22;   // same address again
    check(wr_count == 5, "five writes");
    for (int i = 298; i < 306; i++)
      check(mem[i] == ref_mem[i], $sformatf("mem[%0d]=%h exp %h", i, mem[i], ref_mem[i]));
    // random writes and read-backs
    for (int n = 0; n < 40; n++) begin
      logic [7:0] d;
      a = 10'($urandom);
      d = 8'($urandom);
      send(2'b01, a, rx);
      send(2'b00, {2'b00, d}, rx);
      ref_mem[a] = d;
      send(2'b11, 10'($urandom), rx);      // read some register
      a = 10'($urandom);
      send(2'b11, a, rx);                  // read a, data comes with next cmd
      send(2'b11, a, rx);
      check(rx == ref_mem[a], $sformatf("read %0d got %h exp %h", a, rx, ref_mem[a]));
    end
    // aborted command: 6 bits then ssel high, then a full read
    send(2'b01, 10'd5, rx);
    ssel = 0;
    for (int i = 0; i < 6; i++) begin mosi = 1'b0; #20 spi_clk = 1; #25 spi_clk = 0; #5; end
    ssel = 1; #50;
    send(2'b11, 10'd5, rx);
    send(2'b11, 10'd5, rx);
    check(rx == ref_mem[5], "read after aborted command");
    for (int i = 0; i < 1024; i++) if (mem[i] != ref_mem[i]) begin
      check(0, $sformatf("final mem[%0d]", i));
    end
    check(1'b1, "end reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
