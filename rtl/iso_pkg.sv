// iso_pkg: constants and register-map types shared by the Isochronet switch
// and its host interface card.
//
// The port count, word width, words per control tick and expiration width are
// the published figures of the 4x4, 1 Gb/s Isoswitch. Table and buffer depths
// are this design's own choices, since no sizes are given for them.
package iso_pkg;

  // Switch geometry (published figures).
  localparam int unsigned ISO_N_PORTS = 4;   // four input and four output ports
  localparam int unsigned ISO_WORD_W  = 40;  // internal data word
  localparam int unsigned ISO_BATCH   = 8;   // words moved per control tick
  localparam int unsigned ISO_EXP_W   = 12;  // width of the Expiration field

  // Depths chosen by this design.
  localparam int unsigned ISO_CT_AW   = 8;   // 256 configuration lines per RAM
  localparam int unsigned ISO_INQ_AW  = 8;   // 256-word input queue
  localparam int unsigned ISO_DLY_AW  = 12;  // 4096-word output delay RAM
  localparam int unsigned ISO_BUF_AW  = 8;   // 256-word interface buffers
  localparam int unsigned ISO_N_WL    = 4;   // wavelengths in the optical selection box

  // Host register map of the interface card (word addresses on its bus).
  typedef enum logic [2:0] {
    REG_STATUS  = 3'd0,  // R: events and live status; W: write 1 to clear events
    REG_CONTROL = 3'd1,  // RW: event enables, interrupt enables, TX_GO
    REG_TXLO    = 3'd2,  // W: low 32 bits of the next transmit word
    REG_TXHI    = 3'd3,  // W: high bits of the next transmit word; pushes the word
    REG_RXLO    = 3'd4,  // R: low 32 bits of the oldest received word
    REG_RXHI    = 3'd5,  // R: high bits of the oldest received word
    REG_RXPOP   = 3'd6,  // W: discard the oldest received word
    REG_COUNTS  = 3'd7   // R: [15:0] words in TX buffer, [31:16] words in RX buffer
  } if_reg_e;

  // Event bits, in STATUS[2:0], CONTROL[2:0] (event enable) and CONTROL[6:4]
  // (interrupt enable).
  localparam int unsigned EV_CYCLE = 0;  // an Isochronet cycle began
  localparam int unsigned EV_BAND  = 1;  // a band began
  localparam int unsigned EV_RX    = 2;  // a word was received

  // Live status bits.
  localparam int unsigned ST_TX_BUSY  = 3;   // transmission in progress
  localparam int unsigned ST_TX_FULL  = 4;   // transmit buffer full
  localparam int unsigned ST_RX_AVAIL = 5;   // receive buffer not empty
  localparam int unsigned ST_HAS_PRI  = 6;   // this port has priority in the current band
  localparam int unsigned ST_DEST_LSB = 8;   // [15:8] outputs this port may send to
  localparam int unsigned ST_BAND_LSB = 16;  // [31:16] current band (CT line)

  localparam int unsigned CTL_TX_GO = 8;     // start sending the transmit buffer

endpackage
