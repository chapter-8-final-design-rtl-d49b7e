// tb_ir_remote_top: end-to-end test of the infrared remote: transmitter and
// receiver at their default sizes, each on its own clock (same frequency,
// 3 ns apart in phase), joined by a model of the optical link that can add
// light to turn one short pulse into a long one.
//
// The test releases the receiver's reset in the middle of a frame, then steps
// through all eight button combinations twice. After each change it waits
// four frames and checks that Data shows the buttons; at every receiver clock
// Data may only hold the previous or the current buttons. Every third change
// one data bit of a frame is corrupted on the link, which the checksum must
// reject. The transmitter's frame period must be 37 clocks.
//
// Every mechanism of the design is counted and must occur at least once:
// long and short pulses sent, the start-bit search sliding, start bits found,
// frames accepted, frames rejected by the checksum, and Data updates.
module tb_ir_remote_top;
  import ir_remote_pkg::*;

  logic       tx_clock = 1'b0, rx_clock = 1'b0;
  logic       tx_reset, rx_reset, A, B, C, IR_Out, IR_In;
  logic [2:0] Data;
  logic       inject = 1'b0;
  int unsigned checks = 0, failures = 0;

  int unsigned n_long = 0, n_short = 0, n_frames = 0, n_slide = 0, n_start_ok = 0;
  int unsigned n_accept = 0, n_reject = 0, n_update = 0, n_corrupt = 0;

  ir_remote_top dut (.*);

  assign IR_In = IR_Out | inject;   // the optical link

  always #5 tx_clock = ~tx_clock;
  initial begin
    #3;
    forever #5 rx_clock = ~rx_clock;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- transmitter side: pulses, frame period, link corruption ----
  longint unsigned tx_cyc = 0, last_load = 0;
  logic corrupt_req = 1'b0;
  int   inject_left = 0;

  always @(posedge tx_clock) begin
    tx_cyc <= tx_cyc + 1;
    if (!tx_reset) begin
      case (dut.u_tx.u_fsm.state)
        TX_HIGH2: n_long++;
        TX_LOW1:  n_short++;
        TX_LOAD: begin
          if (n_frames > 0) begin
            checks++;
            if (tx_cyc - last_load != 37) begin
              failures++;
              $display("frame period %0d clocks, expected 37", tx_cyc - last_load);
            end
          end
          n_frames++;
          last_load <= tx_cyc;
        end
        default: ;
      endcase
    end
    // turn a 0 among the six data bits into a 1: keep the line lit for the
    // two clocks after the pulse start
    if (inject_left > 0) begin
      inject_left <= inject_left - 1;
    end else begin
      inject <= 1'b0;
      if (corrupt_req && !tx_reset && dut.u_tx.u_fsm.state == TX_HIGH1 &&
          !dut.u_tx.shiftRegisterOutput[8] &&
          dut.u_tx.count >= 4'd1 && dut.u_tx.count <= 4'd6) begin
        inject      <= 1'b1;
        inject_left <= 1;
        corrupt_req <= 1'b0;
        n_corrupt++;
      end
    end
  end

  // ---- receiver side: mechanisms and the Data invariant ----
  logic [2:0] prev_btn = 3'b000, cur_btn = 3'b000, data_q;

  always @(posedge rx_clock) begin
    data_q <= Data;
    if (!rx_reset) begin
      if (dut.u_rx.countUp) n_slide++;
      if (dut.u_rx.checkStart && dut.u_rx.startResult) n_start_ok++;
      if (dut.u_rx.checkSignal && dut.u_rx.signalResult) n_accept++;
      if (dut.u_rx.checkSignal && !dut.u_rx.signalResult) n_reject++;
      if (Data != data_q) n_update++;
      checks++;
      if (Data != prev_btn && Data != cur_btn) begin
        failures++;
        $display("Data %b is neither %b nor %b", Data, prev_btn, cur_btn);
      end
    end
  end

  task automatic need(input string what, input int unsigned n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never happened: %s", what);
    end
  endtask

  initial begin
    tx_reset = 1; rx_reset = 1; {A, B, C} = 3'b000;
    repeat (2) @(posedge tx_clock);
    #1 tx_reset = 0;
    repeat (20) @(posedge rx_clock);   // receiver starts mid-frame
    #1 rx_reset = 0;
    for (int step = 0; step < 16; step++) begin
      logic [2:0] btn;
      btn = 3'(step * 5 + 3);          // visits all eight values, changing each step
      if (step >= 8) btn = ~btn;
      @(posedge tx_clock); #1;
      prev_btn = cur_btn;
      {A, B, C} = btn;
      cur_btn = btn;
      if (step % 3 == 1) corrupt_req = 1'b1;
      repeat (4 * 37) @(posedge tx_clock);
      #1;
      checks++;
      if (Data !== btn) begin
        failures++;
        $display("step %0d: Data %b expected %b", step, Data, btn);
      end
      prev_btn = cur_btn;
    end
    need("long pulse sent", n_long);
    need("short pulse sent", n_short);
    need("start-bit search slid", n_slide);
    need("start bits found", n_start_ok);
    need("frame accepted", n_accept);
    need("frame rejected by checksum", n_reject);
    need("Data updated", n_update);
    need("link corruption injected", n_corrupt);
    $display("frames=%0d long=%0d short=%0d slides=%0d start_ok=%0d accepted=%0d rejected=%0d updates=%0d corrupted=%0d",
             n_frames, n_long, n_short, n_slide, n_start_ok, n_accept, n_reject, n_update, n_corrupt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
