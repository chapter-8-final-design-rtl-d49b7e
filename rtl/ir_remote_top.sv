// ir_remote_top: the complete infrared TekBot remote control, transmitter and
// receiver side by side.
//
// In use the two halves sit on separate boards, each with its own clock and
// reset: the transmitter turns buttons A, B, C into a repeating pulse-coded
// frame on IR_Out (to the infrared LED), and the receiver turns the pulses on
// IR_In (from the infrared receiver) back into Data = {A, B, C} for the motor
// control logic. The optical link is not logic, so IR_Out and IR_In are both
// ports; connecting them directly gives an ideal link.
//
// Timing: one frame every 37 transmitter clocks. With equal clock frequencies
// and an ideal link, a button change shows on Data within about three frames.
module ir_remote_top
  import ir_remote_pkg::*;
#(
  parameter int unsigned SAMPLE_DELAY = 2
) (
  input  logic       tx_clock,
  input  logic       tx_reset,
  input  logic       A,
  input  logic       B,
  input  logic       C,
  output logic       IR_Out,
  input  logic       rx_clock,
  input  logic       rx_reset,
  input  logic       IR_In,
  output logic [2:0] Data
);

  ir_transmitter u_tx (
    .clock (tx_clock),
    .reset (tx_reset),
    .A     (A),
    .B     (B),
    .C     (C),
    .IR_Out(IR_Out)
  );

  ir_receiver #(.SAMPLE_DELAY(SAMPLE_DELAY)) u_rx (
    .clock(rx_clock),
    .reset(rx_reset),
    .IR_In(IR_In),
    .Data (Data)
  );

endmodule
