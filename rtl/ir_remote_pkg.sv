// ir_remote_pkg: constants and state types shared by the infrared remote
// transmitter and receiver.
//
// A frame is SIGNAL_SIZE = 9 bits, sent bit 8 first:
//   [8:6] start bits (010), [5:3] buttons {A,B,C}, [2:0] inverted buttons.
// The frame layout and the nine-bit length follow the lab text; the start
// pattern 010 is the example the text gives. Every bit is sent as four clock
// periods of IR output: 1110 for a 1 (long pulse), 1000 for a 0 (short pulse).
package ir_remote_pkg;

  localparam int unsigned SIGNAL_SIZE = 9;       // bits per frame
  localparam int unsigned COUNT_W     = 4;       // bit counter width
  localparam logic [2:0]  START_BITS  = 3'b010;  // frame start pattern

  // Transmitter states, numbered as in the transmitter state diagram.
  typedef enum logic [2:0] {
    TX_LOAD  = 3'd0,  // load bit counter and shift register
    TX_HIGH1 = 3'd1,  // first period of every bit, output 1, count down
    TX_HIGH2 = 3'd2,  // bit is 1: output 1
    TX_HIGH3 = 3'd3,  // bit is 1: output 1
    TX_LOW1  = 3'd4,  // bit is 0: output 0
    TX_LOW2  = 3'd5,  // bit is 0: output 0
    TX_END   = 3'd6   // last period of every bit, output 0
  } tx_state_e;

  // Receiver states, numbered as in the receiver state diagram.
  typedef enum logic [2:0] {
    RX_INIT   = 3'd0,  // load signal size, clear shift register
    RX_WAIT   = 3'd1,  // wait for a decoded bit
    RX_ROUTE  = 3'd2,  // decide on the bit count
    RX_CHKST  = 3'd3,  // check start bits
    RX_SLIDE  = 3'd4,  // start bits wrong: count up, keep searching
    RX_CHKSIG = 3'd5,  // check the checksum
    RX_OUTPUT = 3'd6   // checksum good: update the button outputs
  } rx_state_e;

  // Nine-bit frame for the given buttons.
  function automatic logic [SIGNAL_SIZE-1:0] make_frame(input logic [2:0] buttons);
    return {START_BITS, buttons, ~buttons};
  endfunction

endpackage
