// router_pkg: constants and types shared by the 1x32 packet router.
//
// A packet is a header word, any number of payload words and one parity
// word, all DATA_W bits wide. The header carries the destination channel in
// its low ADDR_W bits (bits 4..0 at the default size) and the packet length
// in the bits above them. The parity word is the bitwise XOR of the header
// and every payload word. Word width, channel count and address field come
// from the packet format; the FIFO depth of 16 is this design's own choice.
package router_pkg;

  parameter int unsigned DATA_W     = 32;  // word width
  parameter int unsigned NUM_CH     = 32;  // output channels
  parameter int unsigned ADDR_W     = 5;   // address field, header bits [ADDR_W-1:0]
  parameter int unsigned FIFO_DEPTH = 16;  // words per output FIFO

  // States of the input controller. Their names follow the state diagram.
  typedef enum logic [2:0] {
    DECODE_ADDRESS     = 3'd0,
    LOAD_FIRST_DATA    = 3'd1,
    LOAD_DATA          = 3'd2,
    WAIT_TILL_EMPTY    = 3'd3,
    FIFO_FULL_STATE    = 3'd4,
    LOAD_AFTER_FULL    = 3'd5,
    LOAD_PARITY        = 3'd6,
    CHECK_PARITY_ERROR = 3'd7
  } fsm_state_t;

endpackage
