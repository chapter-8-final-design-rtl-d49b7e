// tb_rx_fsm: self-checking test of the receiver state machine. Decoder,
// shift register, counter and error check are modelled here, so the machine
// is tested on its own. A bit stream is fed as one-clock strobes four clocks
// apart (five between frames): first a few random bits, then frames of
// {010, buttons, ~buttons}, some with a broken checksum. After each frame the
// output must hold the buttons of the latest good frame. The test also checks
// that the start-bit search slid at least once and that bad frames were
// rejected.
module tb_rx_fsm;
  logic       clock = 1'b0;
  logic       reset;
  logic [8:0] shiftRegisterOutput;
  logic [3:0] count, signalSize;
  logic       startResult, signalResult, signalValid;
  logic       loadShiftRegister, clearShiftRegister, loadSignalSize;
  logic       countDown, countUp, checkStart, checkSignal;
  logic [2:0] data;
  logic       bit_in;
  logic       start_q, sum_q;
  int unsigned checks = 0, failures = 0;
  int unsigned slides = 0, rejects = 0, accepts = 0;

  rx_fsm dut (.*);

  always #5 clock = ~clock;

  // models of the blocks around the state machine
  always_ff @(posedge clock) begin
    if (clearShiftRegister)     shiftRegisterOutput <= '0;
    else if (loadShiftRegister) shiftRegisterOutput <= {shiftRegisterOutput[7:0], bit_in};
    if (reset)               count <= '0;
    else if (loadSignalSize) count <= signalSize;
    else if (countDown)      count <= count - 1'b1;
    else if (countUp)        count <= count + 1'b1;
    start_q <= shiftRegisterOutput[2:0] == 3'b010;
    sum_q   <= shiftRegisterOutput[2:0] == ~shiftRegisterOutput[5:3];
  end
  assign startResult  = checkStart && start_q;
  assign signalResult = checkSignal && sum_q;

  always @(posedge clock) begin
    if (!reset) begin
      if (countUp) slides++;
      if (checkSignal && !signalResult) rejects++;
      if (checkSignal && signalResult) accepts++;
    end
  end

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_bit(input logic b);
    bit_in = b; signalValid = 1;
    @(posedge clock); #1;
    signalValid = 0;
    repeat (3) @(posedge clock);
    #1;
  endtask

  initial begin
    logic [2:0] good;
    logic [4:0] lead;
    lead = 5'b11011;
    reset = 1; signalValid = 0; bit_in = 0;
    repeat (2) @(posedge clock);
    #1 reset = 0;
    // leading bits that are not a frame: 1 1 0 1 1 (no 010 inside)
    for (int i = 4; i >= 0; i--) send_bit(lead[i]);
    good = 3'b000;
    for (int f = 0; f < 40; f++) begin
      logic [2:0] btn;
      logic [8:0] frame;
      logic       bad;
      btn   = 3'($urandom);
      bad   = (f % 5 == 3);
      frame = {3'b010, btn, bad ? btn : ~btn};
      for (int i = 8; i >= 0; i--) send_bit(frame[i]);
      @(posedge clock); #1;      // idle clock between frames
      if (!bad) good = btn;
      if (f >= 1) begin
        checks++;
        if (data !== good) begin
          failures++;
          $display("frame %0d: data %b expected %b", f, data, good);
        end
      end
    end
    checks++;
    if (slides == 0) begin failures++; $display("start-bit search never slid"); end
    checks++;
    if (rejects < 8) begin failures++; $display("only %0d bad frames rejected", rejects); end
    checks++;
    if (accepts < 30) begin failures++; $display("only %0d frames accepted", accepts); end
    $display("slides=%0d accepts=%0d rejects=%0d", slides, accepts, rejects);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
