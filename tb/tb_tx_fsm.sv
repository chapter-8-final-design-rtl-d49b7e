// tb_tx_fsm: self-checking test of the transmitter state machine. The counter
// and shift register it controls are modelled here, so the machine is tested
// on its own. For several random frames the IR output is compared clock by
// clock with the expected line code: one idle 0, then 1110 for each 1 and
// 1000 for each 0, bit 8 first; a frame must take exactly 37 clocks.
module tb_tx_fsm;
  logic       clock = 1'b0;
  logic       reset;
  logic [8:0] shiftRegisterOutput;
  logic [3:0] count, signalSize;
  logic       loadShiftRegister, shift_Out, data, loadSignalSize, countDown;
  int unsigned checks = 0, failures = 0;
  logic [8:0] frame;

  tx_fsm dut (.*);

  always #5 clock = ~clock;

  // models of the shift register (shift_In = 0) and the counter
  always_ff @(posedge clock) begin
    if (loadShiftRegister) shiftRegisterOutput <= frame;
    else if (shift_Out)    shiftRegisterOutput <= {shiftRegisterOutput[7:0], 1'b0};
    if (reset)               count <= '0;
    else if (loadSignalSize) count <= signalSize;
    else if (countDown)      count <= count - 1'b1;
  end

  initial begin
    repeat (5000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expected[$];
    reset = 1; frame = 9'b010_000_111;
    repeat (2) @(posedge clock);
    #1 reset = 0;
    for (int f = 0; f < 20; f++) begin
      logic [8:0] sent;
      sent = frame;
      expected = {1'b0};
      for (int i = 8; i >= 0; i--) begin
        if (sent[i]) expected = {expected, 1'b1, 1'b1, 1'b1, 1'b0};
        else         expected = {expected, 1'b1, 1'b0, 1'b0, 1'b0};
      end
      // now in state 0: check the load strobes and the signal size
      checks++;
      if (!loadSignalSize || !loadShiftRegister || signalSize != 4'd9) begin
        failures++;
        $display("frame %0d: state 0 strobes wrong", f);
      end
      foreach (expected[k]) begin
        checks++;
        if (data !== expected[k]) begin
          failures++;
          $display("frame %0d clock %0d: data %b expected %b", f, k, data, expected[k]);
        end
        @(posedge clock);
        #1;
        if (k == 0) frame = 9'($urandom);   // next frame's value, loaded 37 clocks on
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
