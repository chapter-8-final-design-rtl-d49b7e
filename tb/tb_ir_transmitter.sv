// tb_ir_transmitter: self-checking test of the complete transmitter. For all
// eight button combinations the IR output of a whole 37-clock frame is
// compared with the expected pulse code of {010, A, B, C, ~A, ~B, ~C}: an idle
// 0, then 1110 per 1 and 1000 per 0. The frame period is checked by counting
// clocks between the idle slots of consecutive frames.
module tb_ir_transmitter;
  logic clock = 1'b0;
  logic reset, A, B, C, IR_Out;
  int unsigned checks = 0, failures = 0;

  ir_transmitter dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (5000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; {A, B, C} = 3'b000;
    repeat (2) @(posedge clock);
    #1 reset = 0;
    for (int rep = 0; rep < 2; rep++) begin
      for (int b = 0; b < 8; b++) begin
        logic [8:0] frame;
        logic expected[$];
        {A, B, C} = 3'(b);      // sampled in the frame's first clock
        frame = {3'b010, 3'(b), ~3'(b)};
        expected = {1'b0};
        for (int i = 8; i >= 0; i--) begin
          if (frame[i]) expected = {expected, 1'b1, 1'b1, 1'b1, 1'b0};
          else          expected = {expected, 1'b1, 1'b0, 1'b0, 1'b0};
        end
        checks++;
        if (expected.size() != 37) failures++;
        foreach (expected[k]) begin
          checks++;
          if (IR_Out !== expected[k]) begin
            failures++;
            $display("buttons %b clock %0d: IR_Out %b expected %b", 3'(b), k, IR_Out, expected[k]);
          end
          @(posedge clock); #1;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
