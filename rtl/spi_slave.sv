// spi_slave: serial configuration interface of the MEA digital core.
//
// The off-chip master shifts 12-bit command words into the chip on mosi,
// most significant bit first, one bit per rising edge of spi_clk while ssel
// is low. The first two bits sent (bits 11:10 of the command register) are
// the op-code, the remaining ten (bits 9:0) are an address or, in their low
// eight bits, a data byte:
//   00  write the byte at the current address
//   01  load the 10-bit address pointer
//   10  write the byte at the current address, then increment the pointer
//   11  read the register at the 10-bit address given in the command
// The op-codes, the 12-bit command register, the 8-bit read register and the
// internal bus (addr, dout, din, rd, wrt) follow the design; the bit order,
// the active-low select and the timing below are choices of this design.
//
// Timing: the command is decoded combinationally while its last bit is on
// mosi, so wrt/rd, addr and dout are valid during the 12th clock cycle and
// the register memory (same clock) writes on that 12th rising edge; the
// least significant bit of dout is therefore mosi itself in that cycle. A read
// loads din into the 8-bit output register on the same edge; its bits then
// appear on miso, MSB first, during the first eight bit slots of the next
// command (miso changes after each rising edge, the master samples it before
// the next rising edge). Raising ssel aborts a partly received command.
// spi_rst is an asynchronous, active-high reset.
module spi_slave
  import mea_pkg::*;
(
  input  logic              spi_clk,
  input  logic              spi_rst,
  input  logic              ssel,      // chip select, active low
  input  logic              mosi,
  output logic              miso,
  // internal bus to the register memory
  output logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] dout,      // data written to the memory
  input  logic [DATA_W-1:0] din,       // data read from the memory
  output logic              rd,
  output logic              wrt
);

  logic [SPI_FRAME_BITS-2:0] shreg;    // first 11 bits of a command
  logic [3:0]                bit_cnt;  // bits received of this command
  logic [ADDR_W-1:0]         addr_q;   // address pointer
  logic [DATA_W-1:0]         out_q;    // read-back shift register

  logic [SPI_FRAME_BITS-1:0] frame;
  logic                      last;
  spi_op_e                   op;
  logic [ADDR_W-1:0]         payload;
  logic                      cnt_clr;

  assign frame   = {shreg, mosi};
  assign last    = !ssel && (bit_cnt == 4'(SPI_FRAME_BITS - 1));
  assign op      = spi_op_e'(frame[SPI_FRAME_BITS-1 -: 2]);
  assign payload = frame[ADDR_W-1:0];
  assign cnt_clr = spi_rst | ssel;

  always_comb begin
    wrt  = last && (op == OP_WRITE_DATA || op == OP_WRITE_DATA_INC);
    rd   = last && (op == OP_READ);
    addr = (last && op == OP_READ) ? payload : addr_q;
    dout = payload[DATA_W-1:0];
  end

  assign miso = !ssel && out_q[DATA_W-1];

  // Bit counter, cleared whenever the chip is not selected.
  always_ff @(posedge spi_clk or posedge cnt_clr) begin
    if (cnt_clr)   bit_cnt <= '0;
    else if (last) bit_cnt <= '0;
    else           bit_cnt <= bit_cnt + 4'd1;
  end

  always_ff @(posedge spi_clk or posedge spi_rst) begin
    if (spi_rst) begin
      shreg  <= '0;
      addr_q <= '0;
      out_q  <= '0;
    end else if (!ssel) begin
      shreg <= frame[SPI_FRAME_BITS-2:0];
      out_q <= {out_q[DATA_W-2:0], 1'b0};
      if (last) begin
        unique case (op)
          OP_WRITE_DATA:     ;
          OP_WRITE_ADDR:     addr_q <= payload;
          OP_WRITE_DATA_INC: addr_q <= addr_q + 1'b1;
          OP_READ:           out_q  <= din;
        endcase
      end
    end
  end

  // A read and a write never happen together.
  assert property (@(posedge spi_clk) disable iff (spi_rst) !(rd && wrt));

endmodule
