// mea_top: the two digital designs of the microelectrode-array system.
//
// mea_digital_core is the on-chip digital core of the MEA chip: SPI
// configuration interface, register memory for the analog blocks and the
// framing transmitter for recorded data. artifact_remover is the real-time
// stimulation artifact remover that cleans the recorded channels downstream
// of the chip (on an FPGA board in the original system). The two run on
// their own clocks and share no signals; they stand side by side here with
// all their ports brought out. The analog front end (electrodes,
// amplifiers, filters, ADCs, stimulators) is not part of this RTL: its
// configuration leaves on cfg, and its data enters on the four data buses
// and, for the artifact remover, on pca_in_*.
module mea_top
  import mea_pkg::*;
  import pca_pkg::*;
(
  // MEA digital core: SPI, off-chip
  input  logic                      spi_clk,
  input  logic                      spi_rst,
  input  logic                      ssel,
  input  logic                      mosi,
  output logic                      miso,
  // MEA digital core: transmitter, off-chip
  input  logic                      tx_clk,
  input  logic                      tx_rst,
  input  logic                      tx_enbl,
  output logic                      tx_frm_sync,
  output logic [TX_W-1:0]           tx_data_out,
  // MEA digital core: analog blocks, on-chip
  input  logic [TX_W-1:0]           data_bus_n,
  input  logic [TX_W-1:0]           data_bus_s,
  input  logic [TX_W-1:0]           data_bus_e,
  input  logic [TX_W-1:0]           data_bus_w,
  output logic [CNT_W-1:0]          counter,
  output logic [DATA_W-1:0]         cfg [1 << ADDR_W],
  // artifact remover
  input  logic                      pca_clk,
  input  logic                      pca_rst,
  input  logic                      pca_in_valid,
  input  sample_t                   pca_in_sample [N_CH],
  output logic                      pca_out_valid,
  output logic [$clog2(N_CH)-1:0]   pca_out_ch,
  output logic [$clog2(N_SAMP)-1:0] pca_out_idx,
  output sample_t                   pca_out_sample,
  output logic [1:0]                pca_out_comps,
  output logic                      pca_overflow,
  output logic                      pca_block_start,
  output logic                      pca_block_end,
  output logic [31:0]               pca_block_cycles
);

  mea_digital_core u_core (
    .spi_clk, .spi_rst, .ssel, .mosi, .miso,
    .tx_clk, .tx_rst, .tx_enbl, .tx_frm_sync, .tx_data_out,
    .data_bus_n, .data_bus_s, .data_bus_e, .data_bus_w, .counter, .cfg
  );

  artifact_remover u_pca (
    .clk(pca_clk), .rst(pca_rst),
    .in_valid(pca_in_valid), .in_sample(pca_in_sample),
    .out_valid(pca_out_valid), .out_ch(pca_out_ch), .out_idx(pca_out_idx),
    .out_sample(pca_out_sample), .out_comps(pca_out_comps),
    .overflow(pca_overflow), .block_start(pca_block_start), .block_end(pca_block_end),
    .block_cycles(pca_block_cycles)
  );

endmodule
