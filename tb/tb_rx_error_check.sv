// tb_rx_error_check: self-checking test of the start-bit and checksum tests.
// Every 9-bit register value is presented for one clock, then checked with
// checkStart and checkSignal raised in turn; results are compared with the
// rule computed here: [2:0] == 010, and [2:0] == ~[5:3]. Results must be 0
// while no check is requested.
module tb_rx_error_check;
  logic       clock = 1'b0;
  logic [8:0] shiftRegisterOutput;
  logic       checkStart, checkSignal, startResult, signalResult;
  int unsigned checks = 0, failures = 0;
  int unsigned start_hits = 0, sum_hits = 0;

  rx_error_check dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checkStart = 0; checkSignal = 0;
    for (int v = 0; v < 512; v++) begin
      logic exp_start, exp_sum;
      shiftRegisterOutput = 9'(v);
      exp_start = (v[2:0] == 3'b010);
      exp_sum   = (v[2:0] == ~v[5:3]);
      @(posedge clock); #1;
      checks++;
      if (startResult || signalResult) begin
        failures++;
        $display("result raised without a check request");
      end
      checkStart = 1;
      #1;
      checks++;
      if (startResult != exp_start) begin
        failures++;
        $display("startResult wrong for %b", shiftRegisterOutput);
      end
      checkStart = 0; checkSignal = 1;
      #1;
      checks++;
      if (signalResult != exp_sum) begin
        failures++;
        $display("signalResult wrong for %b", shiftRegisterOutput);
      end
      checkSignal = 0;
      start_hits += exp_start;
      sum_hits   += exp_sum;
    end
    checks++;
    if (start_hits != 64 || sum_hits != 64) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
