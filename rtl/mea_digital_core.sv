// mea_digital_core: digital core of the microelectrode-array chip.
//
// Three parts, as in the design: the SPI interface receives configuration
// commands from the off-chip board, the register memory holds the settings
// of the analog blocks (and hands them to those blocks on cfg), and the
// transmitter frames the recorded data of the analog blocks into 1170-word
// frames for the board. The SPI interface and the register memory share the
// SPI clock and reset; the transmitter has its own clock, reset and enable.
// The analog blocks are outside this module: they read cfg, watch counter
// and drive the four data buses.
module mea_digital_core
  import mea_pkg::*;
#(
  parameter int unsigned REG_DEPTH   = 1 << ADDR_W,
  parameter int unsigned FRAME_LEN   = FRAME_WORDS
) (
  // SPI, off-chip
  input  logic              spi_clk,
  input  logic              spi_rst,
  input  logic              ssel,
  input  logic              mosi,
  output logic              miso,
  // transmitter, off-chip
  input  logic              tx_clk,
  input  logic              tx_rst,
  input  logic              tx_enbl,
  output logic              tx_frm_sync,
  output logic [TX_W-1:0]   tx_data_out,
  // analog blocks, on-chip
  input  logic [TX_W-1:0]   data_bus_n,
  input  logic [TX_W-1:0]   data_bus_s,
  input  logic [TX_W-1:0]   data_bus_e,
  input  logic [TX_W-1:0]   data_bus_w,
  output logic [CNT_W-1:0]  counter,
  output logic [DATA_W-1:0] cfg [REG_DEPTH]
);

  logic [ADDR_W-1:0] addr;
  logic [DATA_W-1:0] dout, din;
  logic              rd, wrt;

  spi_slave u_spi (
    .spi_clk, .spi_rst, .ssel, .mosi, .miso,
    .addr, .dout, .din, .rd, .wrt
  );

  register_memory #(.DEPTH(REG_DEPTH)) u_regs (
    .clk(spi_clk), .rst(spi_rst),
    .rd, .wrt, .addr, .dout, .din, .cfg
  );

  tx_framer #(.WORDS(FRAME_LEN)) u_tx (
    .tx_clk, .tx_rst, .tx_enbl, .tx_frm_sync, .tx_data_out,
    .data_bus_n, .data_bus_s, .data_bus_e, .data_bus_w, .counter
  );

endmodule
