// mea_pkg: constants and types shared by the MEA digital core.
//
// The SPI command word is 12 bits: a 2-bit op-code followed by a 10-bit
// payload (an address, or data in the low 8 bits). The op-code values are
// the ones of the command table of the design. The output frame of the
// transmitter holds 1170 ten-bit words: 50 setting words (10 per analog unit)
// followed by 32 impedance, 1024 voltage-recording and 64 voltage-clamp data
// words. Each region is served by a pair of on-chip buses, West/East or
// North/South, with even word numbers taken from the first bus of the pair
// and odd word numbers from the second.
package mea_pkg;

  localparam int unsigned SPI_FRAME_BITS = 12;   // command word length
  localparam int unsigned ADDR_W         = 10;   // register address width
  localparam int unsigned DATA_W         = 8;    // register data width
  localparam int unsigned TX_W           = 10;   // transmitted word width
  localparam int unsigned CNT_W          = 11;   // word counter width

  typedef enum logic [1:0] {
    OP_WRITE_DATA      = 2'b00,  // write data at the current address
    OP_WRITE_ADDR      = 2'b01,  // load the address pointer
    OP_WRITE_DATA_INC  = 2'b10,  // write data, then increment the address
    OP_READ            = 2'b11   // read the register at the given address
  } spi_op_e;

  // Which pair of buses feeds a word of the output frame.
  typedef enum logic [0:0] {
    PAIR_WE = 1'b0,  // West (even words) / East (odd words)
    PAIR_NS = 1'b1   // North (even words) / South (odd words)
  } bus_pair_e;

  typedef enum logic [1:0] {
    BUS_NORTH = 2'd0,
    BUS_SOUTH = 2'd1,
    BUS_EAST  = 2'd2,
    BUS_WEST  = 2'd3
  } bus_sel_e;

  // Frame layout (word numbers, inclusive ranges).
  localparam int unsigned IMP_SET_FIRST   = 0;     // impedance settings   W/E
  localparam int unsigned VREC_SET_FIRST  = 10;    // voltage rec settings N/S
  localparam int unsigned ISRC_SET_FIRST  = 20;    // current src settings N/S
  localparam int unsigned VCLAMP_SET_FIRST= 30;    // voltage clamp sett.  W/E
  localparam int unsigned STIM_SET_FIRST  = 40;    // stimulation settings W/E
  localparam int unsigned IMP_DATA_FIRST  = 50;    // impedance data 32    W/E
  localparam int unsigned VREC_DATA_FIRST = 82;    // voltage data 1024    N/S
  localparam int unsigned VCLAMP_DATA_FIRST = 1106;// voltage clamp 64     W/E
  localparam int unsigned FRAME_WORDS     = 1170;  // words per frame

  // Bus pair that supplies word number w of the frame.
  function automatic bus_pair_e word_pair(input logic [CNT_W-1:0] w);
    if (w >= CNT_W'(VCLAMP_DATA_FIRST))      return PAIR_WE;
    else if (w >= CNT_W'(VREC_DATA_FIRST))   return PAIR_NS;
    else if (w >= CNT_W'(VCLAMP_SET_FIRST))  return PAIR_WE;
    else if (w >= CNT_W'(VREC_SET_FIRST))    return PAIR_NS;
    else                                     return PAIR_WE;
  endfunction

  // Bus that supplies word number w of the frame.
  function automatic bus_sel_e word_bus(input logic [CNT_W-1:0] w);
    if (word_pair(w) == PAIR_NS) return w[0] ? BUS_SOUTH : BUS_NORTH;
    else                         return w[0] ? BUS_EAST  : BUS_WEST;
  endfunction

endpackage
