// tx_framer: transmitter of recorded data to the off-chip board.
//
// Four 10-bit buses (North, South, East, West) bring data from the analog
// blocks. An 11-bit word counter walks through the 1170 words of a frame and
// is given to the analog blocks so that the addressed block drives its bus.
// For each word the bus is chosen by the frame layout of mea_pkg: setting
// words 0-49 (ten per analog unit), impedance data 50-81, voltage recording
// data 82-1105 and voltage clamp data 1106-1169, even words from West or
// North and odd words from East or South. The frame layout, the 11-bit
// counter and the port names follow the design.
//
// Timing (a choice of this design): while tx_enbl is high the counter
// advances by one per tx_clk cycle and wraps after the last word. The bus
// value of word n is registered, so it leaves on tx_data_out one cycle after
// counter shows n; tx_frm_sync is high in the cycle word 0 is on tx_data_out.
// When tx_enbl is low the counter returns to word 0 and the outputs are 0.
// tx_rst is an asynchronous, active-high reset.
module tx_framer
  import mea_pkg::*;
#(
  parameter int unsigned WORDS = FRAME_WORDS
) (
  input  logic             tx_clk,
  input  logic             tx_rst,
  input  logic             tx_enbl,
  output logic             tx_frm_sync,
  output logic [TX_W-1:0]  tx_data_out,
  input  logic [TX_W-1:0]  data_bus_n,
  input  logic [TX_W-1:0]  data_bus_s,
  input  logic [TX_W-1:0]  data_bus_e,
  input  logic [TX_W-1:0]  data_bus_w,
  output logic [CNT_W-1:0] counter
);

  logic [TX_W-1:0] sel_word;

  always_comb begin
    unique case (word_bus(counter))
      BUS_NORTH: sel_word = data_bus_n;
      BUS_SOUTH: sel_word = data_bus_s;
      BUS_EAST:  sel_word = data_bus_e;
      BUS_WEST:  sel_word = data_bus_w;
    endcase
  end

  always_ff @(posedge tx_clk or posedge tx_rst) begin
    if (tx_rst) begin
      counter     <= '0;
      tx_data_out <= '0;
      tx_frm_sync <= 1'b0;
    end else if (!tx_enbl) begin
      counter     <= '0;
      tx_data_out <= '0;
      tx_frm_sync <= 1'b0;
    end else begin
      counter     <= (counter == CNT_W'(WORDS - 1)) ? '0 : counter + 1'b1;
      tx_data_out <= sel_word;
      tx_frm_sync <= (counter == '0);
    end
  end

endmodule
