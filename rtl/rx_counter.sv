// rx_counter: the receiver's four-bit bit counter.
//
// It works like the transmitter's counter: loaded with the frame length at the
// start of a frame and decremented once per received bit, so count = 6 means
// three bits (the start bits) are held and count = 0 means the frame is
// complete. The extra countUp input gives a count back while the receiver
// searches for the start bits, so that each further bit is again checked at
// count = 6.
//
// Interface: synchronous; priority reset (to 0) > loadSignalSize > countDown >
// countUp, a choice of this design. The state machine never asks for both
// directions at once; an assertion checks that.
module rx_counter #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clock,
  input  logic             reset,
  input  logic             loadSignalSize,
  input  logic [WIDTH-1:0] signalSize,
  input  logic             countDown,
  input  logic             countUp,
  output logic [WIDTH-1:0] count
);

  always_ff @(posedge clock) begin
    if (reset)               count <= '0;
    else if (loadSignalSize) count <= signalSize;
    else if (countDown)      count <= count - 1'b1;
    else if (countUp)        count <= count + 1'b1;
  end

  a_one_direction: assert property (@(posedge clock) disable iff (reset) !(countDown && countUp))
    else $error("rx_counter: countDown and countUp both asserted");

endmodule
