// uart_transmitter_tb: self-checking test of the UART transmitter.
//
// A driver offers random characters over ready/valid, sometimes back to back
// (valid held high) and sometimes after random idle gaps. An independent
// line monitor watches serial_out, finds each start bit, samples every symbol
// in its middle and rebuilds the character, which must equal the next one the
// driver handed over. It also checks the timing: the start bit must appear
// the cycle after the handshake, every frame must last exactly
// 10 * CLOCK_FREQ / BAUD_RATE cycles, the line must be high between frames,
// and characters offered back to back must follow with no idle gap.
module uart_transmitter_tb;
  localparam int unsigned CLOCK_FREQ = 1_600;
  localparam int unsigned BAUD_RATE  = 100;
  localparam int SET = CLOCK_FREQ / BAUD_RATE;   // 16 cycles per symbol
  localparam int N   = 40;

  logic       clk = 1'b0, reset = 1'b1;
  logic [7:0] data_in = '0;
  logic       data_in_valid = 1'b0, data_in_ready, serial_out;
  int         checks = 0, failures = 0, cycle = 0;
  int         back_to_back = 0, frames = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  uart_transmitter #(.CLOCK_FREQ(CLOCK_FREQ), .BAUD_RATE(BAUD_RATE)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // What was handed over, and at which clock edge.
  logic [7:0] sent_q[$];
  int         fire_q[$];
  always @(posedge clk)
    if (!reset && data_in_valid && data_in_ready) begin
      sent_q.push_back(data_in);
      fire_q.push_back(cycle);
    end

  // Driver.
  initial begin : driver
    repeat (3) @(negedge clk);
    reset = 1'b0;
    for (int i = 0; i < N; i++) begin
      automatic int gap = (i % 3 == 0) ? 0 : $urandom_range(0, 14 * SET);
      if (gap > 0) begin
        data_in_valid = 1'b0;
        repeat (gap) @(negedge clk);
      end
      data_in       = 8'($urandom);
      data_in_valid = 1'b1;
      do @(posedge clk); while (!data_in_ready);
      @(negedge clk);
    end
    data_in_valid = 1'b0;
  end

  // Line monitor.
  initial begin : monitor
    int prev_end = -1;
    @(negedge reset);
    forever begin
      @(posedge clk);
      if (serial_out == 1'b0) begin
        automatic int s = cycle;   // first edge at which the start bit is seen
        automatic logic [9:0] frame;
        frame[0] = 1'b0;
        check(fire_q.size() > 0, "start bit without a handshake");
        if (fire_q.size() > 0) begin
          automatic int f = fire_q.pop_front();
          check(f + 1 == s, $sformatf("start bit at %0d, handshake at %0d", s, f));
        end
        if (prev_end == s) back_to_back++;
        repeat (SET / 2) @(posedge clk);
        check(serial_out == 1'b0, "start bit not held for a whole symbol");
        for (int b = 1; b < 10; b++) begin
          repeat (SET) @(posedge clk);
          frame[b] = serial_out;
        end
        check(frame[9] == 1'b1, "stop bit is not 1");
        check(sent_q.size() > 0 && frame[8:1] == sent_q[0],
              $sformatf("character %02h sent as %02h", sent_q.size() > 0 ? sent_q[0] : 8'h0, frame[8:1]));
        if (sent_q.size() > 0) void'(sent_q.pop_front());
        // The stop bit must last until the end of the symbol.
        repeat (SET - SET / 2 - 1) begin
          @(posedge clk);
          check(serial_out == 1'b1, "stop bit cut short");
        end
        prev_end = s + 10 * SET;
        frames++;
      end
    end
  end

  initial begin : finish
    wait (frames == N);
    repeat (4 * SET) @(posedge clk);
    check(serial_out == 1'b1, "line not idle high at the end");
    check(back_to_back >= N / 4, $sformatf("only %0d back-to-back frames", back_to_back));
    check(sent_q.size() == 0 && fire_q.size() == 0, "characters accepted but never sent");
    $display("frames=%0d back_to_back=%0d", frames, back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (N * 15 * SET + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired after %0d frames", frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
