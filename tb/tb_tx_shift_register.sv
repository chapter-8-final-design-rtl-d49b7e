// tb_tx_shift_register: self-checking test of the transmitter's nine-bit
// parallel-in, serial-out register. Checks that a loaded frame leaves bit 8
// first, that shifting in zeros empties the register after nine shifts, that
// load wins over shift, and random operation against a reference model.
module tb_tx_shift_register;
  logic       clock = 1'b0;
  logic [8:0] signal, shiftRegisterOutput;
  logic       loadShiftRegister, shift_Out, shift_In;
  int unsigned checks = 0, failures = 0;
  logic [8:0] ref_q;

  tx_shift_register dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (2000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic l, input logic [8:0] v, input logic s, input logic si);
    loadShiftRegister = l; signal = v; shift_Out = s; shift_In = si;
    @(posedge clock);
    if (l)      ref_q = v;
    else if (s) ref_q = {ref_q[7:0], si};
    #1;
    checks++;
    if (shiftRegisterOutput !== ref_q) begin
      failures++;
      $display("tx_shift_register mismatch: got %b expected %b", shiftRegisterOutput, ref_q);
    end
  endtask

  initial begin
    logic [8:0] frame;
    frame = 9'b010_101_010;
    step(1, frame, 0, 0);
    for (int i = 8; i >= 0; i--) begin
      checks++;
      if (shiftRegisterOutput[8] != frame[i]) begin
        failures++;
        $display("bit %0d sent out of order", i);
      end
      step(0, 9'h1FF, 1, 0);
    end
    checks++;
    if (shiftRegisterOutput != 9'd0) begin
      failures++;
      $display("register not empty after a full frame");
    end
    step(1, 9'h155, 1, 1);   // load has priority
    repeat (500) step($urandom_range(0, 7) == 0, 9'($urandom), $urandom_range(0, 1) == 1,
                      $urandom_range(0, 1) == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
