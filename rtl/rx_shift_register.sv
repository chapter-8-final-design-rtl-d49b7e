// rx_shift_register: nine-bit serial-in register that collects the decoded
// bits in the receiver.
//
// Each loadShiftRegister pulse moves the contents one place toward bit 8 and
// puts the decoded bit (signal) into bit 0, so the newest three bits are always
// in [2:0] and a complete frame lies in the same order as in the transmitter:
// [8:6] start bits, [5:3] buttons, [2:0] inverted buttons.
// clearShiftRegister empties the register so a new frame starts fresh, as the
// lab describes; the shift direction and clear-over-load priority are this
// design's choices.
//
// Interface: synchronous to clock; the output is the register.
module rx_shift_register #(
  parameter int unsigned WIDTH = 9
) (
  input  logic             clock,
  input  logic             signal,
  input  logic             loadShiftRegister,
  input  logic             clearShiftRegister,
  output logic [WIDTH-1:0] shiftRegisterOutput
);

  always_ff @(posedge clock) begin
    if (clearShiftRegister)     shiftRegisterOutput <= '0;
    else if (loadShiftRegister) shiftRegisterOutput <= {shiftRegisterOutput[WIDTH-2:0], signal};
  end

endmodule
