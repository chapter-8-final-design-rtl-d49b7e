// rx_fsm: receiver state machine: frame synchronisation, checksum and output.
//
// States follow the lab's receiver state diagram:
//   0  load the counter with SIGNAL_SIZE, clear the shift register
//   1  wait for a decoded bit; when it comes, shift it in and count down
//   2  count = START_COUNT (6, three bits held) -> 3; count = 0 (frame
//      complete) -> 5; otherwise -> 1
//   3  check the start bits: correct -> 1 (collect the rest), wrong -> 4
//   4  count up, so the next bit is again checked as the newest three bits:
//      the search slides one bit at a time along the stream -> 1
//   5  check the checksum: good -> 6, bad -> 0 (start over)
//   6  load the button bits [5:3] into data -> 0
// The lab text says the start bits are checked when "the count will be 3"; the
// diagram says 6. This design follows the diagram (a down-counter from 9).
// The diagram prints "Load Shift Register, Count Down" without a state; here
// they are issued on the 1 -> 2 transition, so that state 2 sees the count
// after the new bit. signalValid, the decoder's new-bit strobe, is an input the
// lab's block does not show but its "Signal = 1, 0" transition needs.
//
// Timing: after a strobe the machine is back in state 1 four clocks later
// (2-3-4-1) while searching, two clocks later (2-1) while collecting, and five
// clocks later (2-5-6-0-1) after a frame. Strobes must be at least that far
// apart; the transmitter's four clocks per bit meet it when both boards run at
// the same frequency, except the five-clock case, which only follows the last
// bit of a frame and is covered by the idle clock the transmitter inserts
// between frames.
//
// Interface: synchronous active-high reset to state 0 with data = 000. The
// whole register is an input, as in the lab's block, but only the button bits
// [5:3] are read here.
module rx_fsm
  import ir_remote_pkg::*;
(
  input  logic                   clock,
  input  logic                   reset,
  input  logic [SIGNAL_SIZE-1:0] shiftRegisterOutput,
  input  logic [COUNT_W-1:0]     count,
  input  logic                   startResult,
  input  logic                   signalResult,
  input  logic                   signalValid,
  output logic                   loadShiftRegister,
  output logic                   clearShiftRegister,
  output logic [2:0]             data,
  output logic                   loadSignalSize,
  output logic [COUNT_W-1:0]     signalSize,
  output logic                   countDown,
  output logic                   countUp,
  output logic                   checkStart,
  output logic                   checkSignal
);

  // Count left when the three start bits are held.
  localparam int unsigned START_COUNT = SIGNAL_SIZE - 3;

  rx_state_e state, state_next;

  always_ff @(posedge clock) begin
    if (reset) begin
      state <= RX_INIT;
      data  <= '0;
    end else begin
      state <= state_next;
      if (state == RX_OUTPUT) data <= shiftRegisterOutput[5:3];
    end
  end

  always_comb begin
    state_next         = state;
    loadShiftRegister  = 1'b0;
    countDown          = 1'b0;
    unique case (state)
      RX_INIT:   state_next = RX_WAIT;
      RX_WAIT:   if (signalValid) begin
                   loadShiftRegister = 1'b1;
                   countDown         = 1'b1;
                   state_next        = RX_ROUTE;
                 end
      RX_ROUTE:  if (count == COUNT_W'(START_COUNT)) state_next = RX_CHKST;
                 else if (count == '0)               state_next = RX_CHKSIG;
                 else                                state_next = RX_WAIT;
      RX_CHKST:  state_next = startResult ? RX_WAIT : RX_SLIDE;
      RX_SLIDE:  state_next = RX_WAIT;
      RX_CHKSIG: state_next = signalResult ? RX_OUTPUT : RX_INIT;
      RX_OUTPUT: state_next = RX_INIT;
      default:   state_next = RX_INIT;
    endcase
  end

  assign loadSignalSize     = (state == RX_INIT);
  assign clearShiftRegister = (state == RX_INIT);
  assign signalSize         = COUNT_W'(SIGNAL_SIZE);
  assign checkStart         = (state == RX_CHKST);
  assign checkSignal        = (state == RX_CHKSIG);
  assign countUp            = (state == RX_SLIDE);

endmodule
