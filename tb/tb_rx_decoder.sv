// tb_rx_decoder: self-checking test of the pulse decoder. A random bit stream
// is sent as 1110 / 1000 pulses (with an idle clock after every nine bits,
// as the transmitter does). Each decoded bit must match, arrive exactly
// SAMPLE_DELAY + 3 = 5 clocks after its pulse starts, and consecutive bits
// must come four clocks apart inside a frame.
module tb_rx_decoder;
  logic clock = 1'b0;
  logic reset, IR_In, signal, signalValid;
  int unsigned checks = 0, failures = 0;
  logic sent_q[$];
  longint unsigned rise_time_q[$];
  longint unsigned cyc = 0;
  int unsigned decoded = 0;

  rx_decoder dut (.*);

  always #5 clock = ~clock;
  always @(posedge clock) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker: compare each strobe with the oldest bit sent
  always @(posedge clock) begin
    if (!reset && signalValid) begin
      checks++;
      decoded++;
      if (sent_q.size() == 0) begin
        failures++;
        $display("strobe with no bit sent");
      end else begin
        logic b;
        longint unsigned t;
        b = sent_q.pop_front();
        t = rise_time_q.pop_front();
        if (signal !== b) begin
          failures++;
          $display("decoded %b expected %b", signal, b);
        end
        checks++;
        if (cyc - t != 5) begin
          failures++;
          $display("decode latency %0d clocks, expected 5", cyc - t);
        end
      end
    end
  end

  initial begin
    reset = 1; IR_In = 0;
    repeat (3) @(posedge clock);
    #1 reset = 0;
    for (int n = 0; n < 300; n++) begin
      logic b;
      b = $urandom_range(0, 1) == 1;
      sent_q.push_back(b);
      rise_time_q.push_back(cyc);
      IR_In = 1; @(posedge clock); #1;
      IR_In = b; @(posedge clock); #1;
      IR_In = b; @(posedge clock); #1;
      IR_In = 0; @(posedge clock); #1;
      if (n % 9 == 8) begin @(posedge clock); #1; end
    end
    repeat (10) @(posedge clock);
    checks++;
    if (decoded != 300 || sent_q.size() != 0) begin
      failures++;
      $display("decoded %0d of 300 bits", decoded);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
