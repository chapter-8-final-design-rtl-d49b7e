// rx_decoder: turns the received infrared pulse train back into bits.
//
// The transmitter starts every bit with a rising edge and keeps the line high
// for three clocks for a 1 (long pulse) or one clock for a 0 (short pulse),
// four clocks per bit. The decoder passes IR_In through two flip-flops, since
// the transmitter runs from another board's clock, and watches for a rising
// edge. SAMPLE_DELAY clocks after the edge it looks at the line again: still
// high means a long pulse (1), low means a short pulse (0). Deciding at a fixed
// time after the rising edge keeps the decoded bits evenly spaced, one per
// four clocks, whatever the bit values; deciding at the falling edge would
// bring a 0 that follows a 1 only two clocks after it. The lab only says that
// the decoder turns the pulses into 1s and 0s; synchronizer, edge detection
// and sampling point are this design's. SAMPLE_DELAY = 2 lies between the
// short (1 clock) and long (3 clock) pulse when both boards run at the same
// frequency; with a receiver clock k times faster, use 2*k.
//
// Interface: signal holds the last decoded bit; signalValid is high for one
// clock when a new bit has been placed on signal, SAMPLE_DELAY + 3 clocks
// after the rising edge reaches IR_In. Synchronous active-high reset.
module rx_decoder #(
  parameter int unsigned SAMPLE_DELAY = 2,
  parameter int unsigned DELAY_W      = 4
) (
  input  logic clock,
  input  logic reset,
  input  logic IR_In,
  output logic signal,
  output logic signalValid
);

  logic [1:0]         sync;     // sync[1] is the synchronized level
  logic               level_q;  // synchronized level one clock earlier
  logic               armed;    // a pulse has started and not been sampled
  logic [DELAY_W-1:0] since;    // clocks since the rising edge

  always_ff @(posedge clock) begin
    if (reset) begin
      sync        <= '0;
      level_q     <= 1'b0;
      armed       <= 1'b0;
      since       <= '0;
      signal      <= 1'b0;
      signalValid <= 1'b0;
    end else begin
      sync        <= {sync[0], IR_In};
      level_q     <= sync[1];
      signalValid <= 1'b0;
      if (armed) begin
        if (since == DELAY_W'(SAMPLE_DELAY)) begin
          signal      <= sync[1];
          signalValid <= 1'b1;
          armed       <= 1'b0;
        end else begin
          since <= since + 1'b1;
        end
      end else if (sync[1] && !level_q) begin
        armed <= 1'b1;
        since <= DELAY_W'(1);
      end
    end
  end

endmodule
