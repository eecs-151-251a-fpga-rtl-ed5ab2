// uart_receiver_tb: self-checking test of the UART receiver.
//
// A line driver sends random 8N1 frames on serial_in: back to back, after idle
// gaps, and with bit times a few percent too short or too long, as a sender
// with a slightly different clock would. A consumer takes the characters with
// a randomly toggling ready. Every character taken must equal the next one
// sent, data_out_valid must stay high and data_out stable until ready is seen,
// and valid must rise exactly 9.5 symbols plus the 3-cycle input path after
// the start bit's falling edge (the stop bit is sampled half a symbol into
// it). A last phase sends two characters with ready held low and checks that
// the newer one replaces the unread one and is delivered exactly once.
module uart_receiver_tb;
  localparam int unsigned CLOCK_FREQ = 3_200;
  localparam int unsigned BAUD_RATE  = 100;
  localparam int SET = CLOCK_FREQ / BAUD_RATE;   // 32 cycles per symbol
  localparam int N   = 60;

  logic       clk = 1'b0, reset = 1'b1;
  logic [7:0] data_out;
  logic       data_out_valid, data_out_ready = 1'b0, serial_in = 1'b1;
  int         checks = 0, failures = 0, cycle = 0, received = 0;
  int         latency_checked = 0, held_checked = 0;
  bit         random_ready = 1'b1;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  uart_receiver #(.CLOCK_FREQ(CLOCK_FREQ), .BAUD_RATE(BAUD_RATE)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  logic [7:0] sent_q[$];
  int         start_q[$];   // first clock edge that sees each start bit

  // Drive one frame with the given bit time, changing the line at negedges.
  task automatic send(input logic [7:0] c, input int bit_cycles);
    logic [9:0] frame;
    frame = {1'b1, c, 1'b0};
    @(negedge clk);
    sent_q.push_back(c);
    start_q.push_back(cycle);   // the value the next posedge reads
    for (int b = 0; b < 10; b++) begin
      serial_in = frame[b];
      repeat (bit_cycles) @(negedge clk);
    end
  endtask

  // Consumer with a randomly toggling ready, driven at negedges.
  always @(negedge clk)
    if (random_ready) data_out_ready <= ($urandom_range(0, 3) != 0);

  // Check deliveries, the hold rule and the latency.
  logic [7:0] prev_data;
  logic       prev_valid = 1'b0, prev_ready = 1'b0;
  always @(posedge clk) begin
    if (!reset) begin
      if (data_out_valid && !prev_valid && start_q.size() > 0 && random_ready) begin
        check(cycle == start_q[0] + 9 * SET + SET / 2 + 3,
              $sformatf("valid at %0d, start bit at %0d", cycle, start_q[0]));
        latency_checked++;
      end
      if (prev_valid && !prev_ready && random_ready) begin
        check(data_out_valid && data_out == prev_data, "offered character dropped or changed before ready");
        held_checked++;
      end
      if (data_out_valid && data_out_ready) begin
        check(sent_q.size() > 0 && data_out == sent_q[0],
              $sformatf("received %02h, expected %02h", data_out, sent_q.size() > 0 ? sent_q[0] : 8'h0));
        if (sent_q.size() > 0) begin
          void'(sent_q.pop_front());
          void'(start_q.pop_front());
        end
        received++;
      end
      prev_valid <= data_out_valid;
      prev_ready <= data_out_ready;
      prev_data  <= data_out;
    end
  end

  initial begin : stimulus
    repeat (3) @(negedge clk);
    reset = 1'b0;
    repeat (5) @(negedge clk);
    for (int i = 0; i < N; i++) begin
      automatic int bit_cycles = SET + $urandom_range(0, 2) - 1;   // about +-3%
      send(8'($urandom), bit_cycles);
      if (i % 4 == 3) repeat ($urandom_range(1, 3 * SET)) @(negedge clk);
    end
    repeat (2 * SET) @(negedge clk);
    check(received == N, $sformatf("%0d of %0d characters received", received, N));

    // Overwrite: nobody reads, two characters arrive, the second one wins.
    random_ready   = 1'b0;
    data_out_ready = 1'b0;
    send(8'hA5, SET);
    send(8'h3C, SET);
    repeat (SET) @(negedge clk);
    check(data_out_valid && data_out == 8'h3C, "unread character not replaced by the newer one");
    void'(sent_q.pop_front());
    void'(start_q.pop_front());
    data_out_ready = 1'b1;
    @(negedge clk);
    data_out_ready = 1'b0;
    repeat (3) @(negedge clk);
    check(!data_out_valid, "valid not dropped after the character was taken");
    check(received == N + 1, "replaced character delivered other than once");
    check(latency_checked > N / 4, "too few latency checks");
    check(held_checked > 0, "ready never held low while valid");
    $display("received=%0d latency_checked=%0d held_checked=%0d", received, latency_checked, held_checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (N * 16 * SET + 100 * SET) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired after %0d characters", received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
