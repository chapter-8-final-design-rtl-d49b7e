// rx_error_check: start-bit and checksum tests of the receiver.
//
// startResult: the newest three received bits, shiftRegisterOutput[2:0],
// equal the start pattern 010.
// signalResult: the button bits [5:3] plus the inverted button bits [2:0]
// equal 111, which holds exactly when the second group is the complement of
// the first. Both tests come from the lab text.
//
// Both comparisons are registered on every clock and the outputs are the
// registered values gated by checkStart / checkSignal. The state machine only
// asks for a check at least one clock after the last change of the shift
// register, so the registered value is that of the current contents. The
// registering is this design's choice (the lab's block has a clock but its
// inside is not shown).
//
// Interface: bits [8:6] of the register are not needed by either test.
// checkStart/checkSignal are levels from the state machine; results
// are valid in the same clock. No reset is needed: every register is rewritten
// each clock.
module rx_error_check
  import ir_remote_pkg::*;
(
  input  logic                   clock,
  input  logic [SIGNAL_SIZE-1:0] shiftRegisterOutput,
  input  logic                   checkStart,
  input  logic                   checkSignal,
  output logic                   startResult,
  output logic                   signalResult
);

  logic start_match_q;
  logic sum_match_q;
  logic [3:0] sum;

  assign sum = {1'b0, shiftRegisterOutput[5:3]} + {1'b0, shiftRegisterOutput[2:0]};

  always_ff @(posedge clock) begin
    start_match_q <= (shiftRegisterOutput[2:0] == START_BITS);
    sum_match_q   <= (sum == 4'b0111);
  end

  assign startResult  = checkStart  && start_match_q;
  assign signalResult = checkSignal && sum_match_q;

endmodule
