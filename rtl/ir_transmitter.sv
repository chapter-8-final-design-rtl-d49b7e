// ir_transmitter: infrared remote-control transmitter for three buttons.
//
// The buttons A, B, C are framed as {010, A, B, C, ~A, ~B, ~C} (start bits,
// data, inverted data as a checksum) and sent over and over, bit 8 first,
// each bit as four clock periods of IR_Out: 1110 for a 1, 1000 for a 0.
// A frame takes 1 + 4*9 = 37 clocks; the buttons are sampled in the first
// clock of each frame. The three sub-blocks (state machine, 9-bit shift
// register, 4-bit counter) and their wiring follow the lab's transmitter block
// diagram, with the shift register's serial input tied low. The button order
// inside the frame (A in bit 5) is this design's choice.
//
// Interface: one clock, synchronous active-high reset. The buttons are
// expected to be stable (debounced) across the load clock; IR_Out drives the
// LED driver directly, without a carrier.
module ir_transmitter
  import ir_remote_pkg::*;
(
  input  logic clock,
  input  logic reset,
  input  logic A,
  input  logic B,
  input  logic C,
  output logic IR_Out
);

  logic [SIGNAL_SIZE-1:0] frame;
  logic [SIGNAL_SIZE-1:0] shiftRegisterOutput;
  logic [COUNT_W-1:0]     count;
  logic [COUNT_W-1:0]     signalSize;
  logic                   loadShiftRegister;
  logic                   shift_Out;
  logic                   loadSignalSize;
  logic                   countDown;

  assign frame = make_frame({A, B, C});

  tx_fsm u_fsm (
    .clock              (clock),
    .reset              (reset),
    .shiftRegisterOutput(shiftRegisterOutput),
    .count              (count),
    .loadShiftRegister  (loadShiftRegister),
    .shift_Out          (shift_Out),
    .data               (IR_Out),
    .loadSignalSize     (loadSignalSize),
    .signalSize         (signalSize),
    .countDown          (countDown)
  );

  tx_shift_register #(.WIDTH(SIGNAL_SIZE)) u_shift (
    .clock              (clock),
    .signal             (frame),
    .loadShiftRegister  (loadShiftRegister),
    .shift_Out          (shift_Out),
    .shift_In           (1'b0),
    .shiftRegisterOutput(shiftRegisterOutput)
  );

  tx_counter #(.WIDTH(COUNT_W)) u_count (
    .clock         (clock),
    .reset         (reset),
    .loadSignalSize(loadSignalSize),
    .signalSize    (signalSize),
    .countDown     (countDown),
    .count         (count)
  );

endmodule
