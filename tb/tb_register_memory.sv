// tb_register_memory: self-checking test of the configuration registers.
//
// Writes random bytes to random registers, keeping a reference copy, and
// checks read data on din, the zero on din when rd is low, the cfg outputs
// of all 1024 registers and the clear by reset.
module tb_register_memory;
  import mea_pkg::*;

  logic clk = 0, rst = 1, rd = 0, wrt = 0;
  logic [ADDR_W-1:0] addr = '0;
  logic [DATA_W-1:0] dout = '0, din;
  logic [DATA_W-1:0] cfg [1024];
  logic [7:0] ref_mem [1024];
  int checks = 0, failures = 0;

  register_memory dut (.*);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 1024; i++) ref_mem[i] = 8'h00;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 1024; i++) check(cfg[i] == 8'h00, "reset value");
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      addr = 10'($urandom);
      if ($urandom_range(0, 1) == 1) begin
        wrt = 1; rd = 0; dout = 8'($urandom);
        ref_mem[addr] = dout;
      end else begin
        wrt = 0; rd = $urandom_range(0, 3) != 0;
        #1;
        check(din == (rd ? ref_mem[addr] : 8'h00),
              $sformatf("din at %0d: %h exp %h", addr, din, rd ? ref_mem[addr] : 8'h00));
      end
    end
    @(negedge clk); wrt = 0; rd = 0;
    for (int i = 0; i < 1024; i++) check(cfg[i] == ref_mem[i], $sformatf("cfg[%0d]", i));
    rst = 1; #1;
    check(cfg[addr] == 8'h00, "cleared by reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
