// ir_receiver: infrared remote-control receiver for three buttons.
//
// The pulse train from the infrared receiver is decoded into bits, which are
// shifted into a nine-bit register. The state machine first hunts for the
// start bits 010: each time three bits are held it checks the newest three,
// and if they are wrong it lets one more bit in and checks again, sliding
// along the stream until the pattern appears. It then collects the remaining
// six bits and accepts the frame only if the button bits plus the inverted
// button bits make 111; an accepted frame updates Data, a rejected one
// restarts the hunt. Data keeps its value between accepted frames.
// The five blocks (decoder, error check, shift register, counter, state
// machine) and their wiring follow the lab's receiver block diagram; the
// decoder's new-bit strobe to the state machine is this design's addition.
//
// Interface: one clock, synchronous active-high reset (Data = 000). With the
// receiver clock at the transmitter's frequency, Data is updated once per
// 37-clock frame, 9 clocks (SAMPLE_DELAY + 7) after the rising edge of the
// last bit's pulse reaches IR_In. Data = {A, B, C}.
module ir_receiver
  import ir_remote_pkg::*;
#(
  parameter int unsigned SAMPLE_DELAY = 2
) (
  input  logic       clock,
  input  logic       reset,
  input  logic       IR_In,
  output logic [2:0] Data
);

  logic                   bit_value;
  logic                   bit_valid;
  logic [SIGNAL_SIZE-1:0] shiftRegisterOutput;
  logic [COUNT_W-1:0]     count;
  logic [COUNT_W-1:0]     signalSize;
  logic                   loadShiftRegister;
  logic                   clearShiftRegister;
  logic                   loadSignalSize;
  logic                   countDown;
  logic                   countUp;
  logic                   checkStart;
  logic                   checkSignal;
  logic                   startResult;
  logic                   signalResult;

  rx_decoder #(.SAMPLE_DELAY(SAMPLE_DELAY)) u_decoder (
    .clock      (clock),
    .reset      (reset),
    .IR_In      (IR_In),
    .signal     (bit_value),
    .signalValid(bit_valid)
  );

  rx_shift_register #(.WIDTH(SIGNAL_SIZE)) u_shift (
    .clock              (clock),
    .signal             (bit_value),
    .loadShiftRegister  (loadShiftRegister),
    .clearShiftRegister (clearShiftRegister),
    .shiftRegisterOutput(shiftRegisterOutput)
  );

  rx_counter #(.WIDTH(COUNT_W)) u_count (
    .clock         (clock),
    .reset         (reset),
    .loadSignalSize(loadSignalSize),
    .signalSize    (signalSize),
    .countDown     (countDown),
    .countUp       (countUp),
    .count         (count)
  );

  rx_error_check u_check (
    .clock              (clock),
    .shiftRegisterOutput(shiftRegisterOutput),
    .checkStart         (checkStart),
    .checkSignal        (checkSignal),
    .startResult        (startResult),
    .signalResult       (signalResult)
  );

  rx_fsm u_fsm (
    .clock              (clock),
    .reset              (reset),
    .shiftRegisterOutput(shiftRegisterOutput),
    .count              (count),
    .startResult        (startResult),
    .signalResult       (signalResult),
    .signalValid        (bit_valid),
    .loadShiftRegister  (loadShiftRegister),
    .clearShiftRegister (clearShiftRegister),
    .data               (Data),
    .loadSignalSize     (loadSignalSize),
    .signalSize         (signalSize),
    .countDown          (countDown),
    .countUp            (countUp),
    .checkStart         (checkStart),
    .checkSignal        (checkSignal)
  );

endmodule
