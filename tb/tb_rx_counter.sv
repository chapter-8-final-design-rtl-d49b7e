// tb_rx_counter: self-checking test of the receiver bit counter: reset, load,
// count down and count up (never both at once) against a reference model,
// plus the start-bit search pattern 9 -> 6, up to 7, down to 6.
module tb_rx_counter;
  logic       clock = 1'b0;
  logic       reset, loadSignalSize, countDown, countUp;
  logic [3:0] signalSize, count;
  int unsigned checks = 0, failures = 0;
  logic [3:0] ref_count;

  rx_counter dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (2000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic r, input logic l, input logic [3:0] v, input logic d,
                      input logic u);
    reset = r; loadSignalSize = l; signalSize = v; countDown = d; countUp = u;
    @(posedge clock);
    if (r)      ref_count = 4'd0;
    else if (l) ref_count = v;
    else if (d) ref_count = ref_count - 4'd1;
    else if (u) ref_count = ref_count + 4'd1;
    #1;
    checks++;
    if (count !== ref_count) begin
      failures++;
      $display("rx_counter mismatch: got %0d expected %0d", count, ref_count);
    end
  endtask

  initial begin
    step(1, 0, 0, 0, 0);
    step(0, 1, 4'd9, 0, 0);
    repeat (3) step(0, 0, 0, 1, 0);
    checks++; if (count != 4'd6) failures++;
    step(0, 0, 0, 0, 1);
    checks++; if (count != 4'd7) failures++;
    step(0, 0, 0, 1, 0);
    checks++; if (count != 4'd6) failures++;
    repeat (500) begin
      logic d;
      d = $urandom_range(0, 1) == 1;
      step($urandom_range(0, 15) == 0, $urandom_range(0, 3) == 0, 4'($urandom), d,
           !d && ($urandom_range(0, 1) == 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
