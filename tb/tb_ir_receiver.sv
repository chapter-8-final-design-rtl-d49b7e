// tb_ir_receiver: self-checking test of the complete receiver. The test
// generates the transmitter's line code itself (an idle 0, then 1110 per 1
// and 1000 per 0 for each bit of {010, buttons, ~buttons}), starting in the
// middle of a frame so that the receiver must find the start bits. Some
// frames carry a broken checksum and must be ignored. After every frame Data
// must equal the buttons of the latest good frame, and a new value must
// appear exactly 9 clocks after the rising edge of the frame's last pulse.
module tb_ir_receiver;
  logic       clock = 1'b0;
  logic       reset, IR_In;
  logic [2:0] Data;
  int unsigned checks = 0, failures = 0;
  longint unsigned cyc = 0, last_rise = 0;
  logic [2:0] data_q;
  int unsigned updates = 0;

  ir_receiver dut (.*);

  always #5 clock = ~clock;
  always @(posedge clock) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // latency of every change of Data
  always @(posedge clock) begin
    data_q <= Data;
    if (!reset && Data != data_q) begin
      updates++;
      checks++;
      if (cyc - last_rise != 9) begin
        failures++;
        $display("Data changed %0d clocks after the last pulse, expected 9", cyc - last_rise);
      end
    end
  end

  task automatic send_bit(input logic b, input logic last);
    if (last) last_rise = cyc;
    IR_In = 1; @(posedge clock); #1;
    IR_In = b; @(posedge clock); #1;
    IR_In = b; @(posedge clock); #1;
    IR_In = 0; @(posedge clock); #1;
  endtask

  initial begin
    logic [2:0] good;
    reset = 1; IR_In = 0;
    repeat (3) @(posedge clock);
    #1 reset = 0;
    // tail of a frame for buttons 101: bits 101 010 (no idle before)
    send_bit(1, 0); send_bit(0, 0); send_bit(1, 0);
    send_bit(0, 0); send_bit(1, 0); send_bit(0, 0);
    IR_In = 0; @(posedge clock); #1;
    good = 3'b000;
    for (int f = 0; f < 40; f++) begin
      logic [2:0] btn;
      logic [8:0] frame;
      logic       bad;
      btn   = 3'($urandom);
      bad   = (f % 7 == 4);
      frame = {3'b010, btn, bad ? ~btn ^ 3'b100 : ~btn};
      for (int i = 8; i >= 0; i--) send_bit(frame[i], i == 0);
      IR_In = 0; @(posedge clock); #1;   // idle clock
      if (!bad) good = btn;
      repeat (4) @(posedge clock);       // let Data settle (next frame is late)
      #1;
      checks++;
      if (Data !== good) begin
        failures++;
        $display("frame %0d: Data %b expected %b", f, Data, good);
      end
    end
    checks++;
    if (updates < 10) begin failures++; $display("Data changed only %0d times", updates); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
