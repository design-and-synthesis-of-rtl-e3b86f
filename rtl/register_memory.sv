// register_memory: configuration registers of the analog blocks.
//
// Seen from the digital core, every setting of the analog front end (filter
// corner frequency, amplifier gain, stimulation settings and so on) is an
// 8-bit register. DEPTH registers sit on the internal bus of the SPI
// interface: wrt writes dout into register addr on the rising clock edge,
// rd puts register addr on din combinationally (din is zero otherwise), so
// the SPI block can capture it on the same edge. All registers drive the
// analog blocks continuously through cfg. The bus names, the 10-bit address
// and the 8-bit data follow the design; the asynchronous clear to zero and
// the zero on din when not reading are choices of this design.
module register_memory
  import mea_pkg::*;
#(
  parameter int unsigned DEPTH = 1 << ADDR_W   // 1024 registers
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              rd,
  input  logic              wrt,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] dout,   // write data from the bus
  output logic [DATA_W-1:0] din,    // read data to the bus
  output logic [DATA_W-1:0] cfg [DEPTH]
);

  logic [DATA_W-1:0] regs [DEPTH];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < int'(DEPTH); i++) regs[i] <= '0;
    end else if (wrt && (32'(addr) < DEPTH)) begin
      regs[addr] <= dout;
    end
  end

  assign din = (rd && (32'(addr) < DEPTH)) ? regs[addr] : '0;
  assign cfg = regs;

endmodule
