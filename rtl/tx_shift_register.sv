// tx_shift_register: nine-bit parallel-in, serial-out register of the
// transmitter.
//
// loadShiftRegister copies the frame (start bits, buttons, inverted buttons)
// in; shift_Out moves every bit one place toward bit 8 and enters shift_In at
// bit 0. Bit 8 is the bit on air, so the frame leaves most significant bit
// first. With shift_In tied low, as in the lab's block diagram, the register
// is all zeros once the whole frame has been shifted out.
//
// Interface: synchronous to clock, load has priority over shift. There is no
// reset pin (none is drawn); the state machine loads the register before any
// bit of it is used. Output is the register itself.
module tx_shift_register #(
  parameter int unsigned WIDTH = 9
) (
  input  logic             clock,
  input  logic [WIDTH-1:0] signal,
  input  logic             loadShiftRegister,
  input  logic             shift_Out,
  input  logic             shift_In,
  output logic [WIDTH-1:0] shiftRegisterOutput
);

  always_ff @(posedge clock) begin
    if (loadShiftRegister) shiftRegisterOutput <= signal;
    else if (shift_Out)    shiftRegisterOutput <= {shiftRegisterOutput[WIDTH-2:0], shift_In};
  end

endmodule
