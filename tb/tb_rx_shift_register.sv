// tb_rx_shift_register: self-checking test of the receiver's serial-in
// register: nine bits shifted in land in transmit order ([8] first bit),
// clear empties it and wins over a shift, random operation against a model.
module tb_rx_shift_register;
  logic       clock = 1'b0;
  logic       signal, loadShiftRegister, clearShiftRegister;
  logic [8:0] shiftRegisterOutput;
  int unsigned checks = 0, failures = 0;
  logic [8:0] ref_q;

  rx_shift_register dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (2000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic c, input logic l, input logic b);
    clearShiftRegister = c; loadShiftRegister = l; signal = b;
    @(posedge clock);
    if (c)      ref_q = '0;
    else if (l) ref_q = {ref_q[7:0], b};
    #1;
    checks++;
    if (shiftRegisterOutput !== ref_q) begin
      failures++;
      $display("rx_shift_register mismatch: got %b expected %b", shiftRegisterOutput, ref_q);
    end
  endtask

  initial begin
    logic [8:0] frame;
    frame = 9'b010_110_001;
    step(1, 0, 0);
    for (int i = 8; i >= 0; i--) begin
      step(0, 1, frame[i]);
      step(0, 0, ~frame[i]);   // no load: input ignored
    end
    checks++;
    if (shiftRegisterOutput != frame) begin
      failures++;
      $display("frame not assembled in order: %b", shiftRegisterOutput);
    end
    step(1, 1, 1);
    repeat (500) step($urandom_range(0, 15) == 0, $urandom_range(0, 1) == 1,
                      $urandom_range(0, 1) == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
