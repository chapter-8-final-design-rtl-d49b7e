// tb_tx_counter: self-checking test of the transmitter bit counter.
// Random reset / load / count-down commands are applied and the count is
// compared every clock with a reference kept in the testbench. A directed
// part loads 9 and counts to 0 as one frame does.
module tb_tx_counter;
  logic       clock = 1'b0;
  logic       reset, loadSignalSize, countDown;
  logic [3:0] signalSize, count;
  int unsigned checks = 0, failures = 0;
  logic [3:0] ref_count;

  tx_counter dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (2000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic r, input logic l, input logic [3:0] v, input logic d);
    reset = r; loadSignalSize = l; signalSize = v; countDown = d;
    @(posedge clock);
    if (r)      ref_count = 4'd0;
    else if (l) ref_count = v;
    else if (d) ref_count = ref_count - 4'd1;
    #1;
    checks++;
    if (count !== ref_count) begin
      failures++;
      $display("tx_counter mismatch: got %0d expected %0d", count, ref_count);
    end
  endtask

  initial begin
    step(1, 0, 0, 0);
    // one frame: load 9, nine count-downs reach 0
    step(0, 1, 4'd9, 0);
    for (int i = 8; i >= 0; i--) begin
      step(0, 0, 4'd0, 1);
      checks++;
      if (count != 4'(i)) failures++;
    end
    // load wins over count-down
    step(0, 1, 4'd5, 1);
    repeat (500) step($urandom_range(0, 15) == 0, $urandom_range(0, 3) == 0,
                      4'($urandom), $urandom_range(0, 1) == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
