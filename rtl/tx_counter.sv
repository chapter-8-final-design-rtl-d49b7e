// tx_counter: the transmitter's four-bit bit counter.
//
// The state machine loads it with the frame length (signalSize) at the start
// of a frame and pulses countDown once per bit sent, so count reaches 0 when
// the last bit has gone out. The lab offers counting up or down; this design
// counts down, as the state diagram's "Count = 0" test implies.
//
// Interface: all inputs sampled on the rising clock edge. Priority is
// reset (to 0) > loadSignalSize > countDown; reset polarity and priority are
// this design's choice. count is the register output, valid one cycle after
// the command.
module tx_counter #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clock,
  input  logic             reset,
  input  logic             loadSignalSize,
  input  logic [WIDTH-1:0] signalSize,
  input  logic             countDown,
  output logic [WIDTH-1:0] count
);

  always_ff @(posedge clock) begin
    if (reset)               count <= '0;
    else if (loadSignalSize) count <= signalSize;
    else if (countDown)      count <= count - 1'b1;
  end

endmodule
