// tx_fsm: transmitter state machine that turns the shift register's top bit
// into a long or a short infrared pulse.
//
// States follow the lab's transmitter state diagram:
//   0  load the counter with SIGNAL_SIZE and the shift register with the frame
//   1  output 1, count down, shift the register; go to 2 if bit 8 was 1, else 4
//   2, 3  output 1        (a 1 bit: 1110)
//   4, 5  output 0        (a 0 bit: 1000)
//   6  output 0; back to 1 while count != 0, to 0 when the frame is done
// So every bit takes four clocks and a frame 1 + 4*SIGNAL_SIZE clocks, after
// which the buttons are sampled again. The output levels of states 1-6 are the
// lab's; state 0 sending 0, and shifting the register in state 1 (the diagram
// names no state for it), are this design's choices. The branch in state 1
// looks at bit 8 before the shift takes effect.
//
// Interface: synchronous reset to state 0. All outputs are decoded from the
// state register (Moore); data is the IR pulse output.
module tx_fsm
  import ir_remote_pkg::*;
(
  input  logic                   clock,
  input  logic                   reset,
  input  logic [SIGNAL_SIZE-1:0] shiftRegisterOutput,
  input  logic [COUNT_W-1:0]     count,
  output logic                   loadShiftRegister,
  output logic                   shift_Out,
  output logic                   data,
  output logic                   loadSignalSize,
  output logic [COUNT_W-1:0]     signalSize,
  output logic                   countDown
);

  tx_state_e state, state_next;

  always_ff @(posedge clock) begin
    if (reset) state <= TX_LOAD;
    else       state <= state_next;
  end

  always_comb begin
    state_next = state;
    unique case (state)
      TX_LOAD:  state_next = TX_HIGH1;
      TX_HIGH1: state_next = shiftRegisterOutput[SIGNAL_SIZE-1] ? TX_HIGH2 : TX_LOW1;
      TX_HIGH2: state_next = TX_HIGH3;
      TX_HIGH3: state_next = TX_END;
      TX_LOW1:  state_next = TX_LOW2;
      TX_LOW2:  state_next = TX_END;
      TX_END:   state_next = (count == '0) ? TX_LOAD : TX_HIGH1;
      default:  state_next = TX_LOAD;
    endcase
  end

  assign loadSignalSize    = (state == TX_LOAD);
  assign loadShiftRegister = (state == TX_LOAD);
  assign countDown         = (state == TX_HIGH1);
  assign shift_Out         = (state == TX_HIGH1);
  assign signalSize        = COUNT_W'(SIGNAL_SIZE);
  assign data              = (state == TX_HIGH1) || (state == TX_HIGH2) || (state == TX_HIGH3);

endmodule
