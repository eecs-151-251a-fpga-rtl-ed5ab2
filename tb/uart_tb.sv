// uart_tb: two UARTs with their serial lines crossed, talking to each other.
//
// Each side sends a stream of random characters to the other, both directions
// at once, with the transmit valid held high so frames go back to back. Each
// receiver's output is read by a consumer that is always ready; every
// character must arrive intact and in order. The whole exchange must take no
// longer than the serial line allows: N back-to-back frames of 10 symbols, plus
// a few cycles of pipeline.
module uart_tb;
  localparam int unsigned CLOCK_FREQ = 1_600;
  localparam int unsigned BAUD_RATE  = 100;
  localparam int SET = CLOCK_FREQ / BAUD_RATE;
  localparam int N   = 30;

  logic clk = 1'b0, reset = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic [7:0] a_in, a_out, b_in, b_out;
  logic       a_in_valid = 1'b0, a_in_ready, a_out_valid;
  logic       b_in_valid = 1'b0, b_in_ready, b_out_valid;
  logic       a_to_b, b_to_a;

  uart #(.CLOCK_FREQ(CLOCK_FREQ), .BAUD_RATE(BAUD_RATE)) uart_a (
    .clk, .reset,
    .data_in(a_in), .data_in_valid(a_in_valid), .data_in_ready(a_in_ready),
    .data_out(a_out), .data_out_valid(a_out_valid), .data_out_ready(1'b1),
    .serial_in(b_to_a), .serial_out(a_to_b));

  uart #(.CLOCK_FREQ(CLOCK_FREQ), .BAUD_RATE(BAUD_RATE)) uart_b (
    .clk, .reset,
    .data_in(b_in), .data_in_valid(b_in_valid), .data_in_ready(b_in_ready),
    .data_out(b_out), .data_out_valid(b_out_valid), .data_out_ready(1'b1),
    .serial_in(a_to_b), .serial_out(b_to_a));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  logic [7:0] a_msg[N], b_msg[N];
  int a_sent = 0, b_sent = 0, a_got = 0, b_got = 0;

  always @(posedge clk) if (!reset) begin
    if (a_in_valid && a_in_ready) a_sent++;
    if (b_in_valid && b_in_ready) b_sent++;
    if (b_out_valid) begin
      check(b_got < N && b_out == a_msg[b_got], $sformatf("B got %02h, A sent %02h", b_out, a_msg[b_got % N]));
      b_got++;
    end
    if (a_out_valid) begin
      check(a_got < N && a_out == b_msg[a_got], $sformatf("A got %02h, B sent %02h", a_out, b_msg[a_got % N]));
      a_got++;
    end
  end

  // Senders: keep valid high and move to the next character after each handshake.
  always @(negedge clk) if (!reset) begin
    a_in_valid <= (a_sent < N);
    b_in_valid <= (b_sent < N);
    a_in       <= a_msg[a_sent % N];
    b_in       <= b_msg[b_sent % N];
  end

  initial begin
    int t0;
    foreach (a_msg[i]) begin
      a_msg[i] = 8'($urandom);
      b_msg[i] = 8'($urandom);
    end
    repeat (3) @(negedge clk);
    reset = 1'b0;
    t0 = cycle;
    wait (a_got == N && b_got == N);
    @(negedge clk);
    check(cycle - t0 <= N * 10 * SET + 10,
          $sformatf("exchange took %0d cycles, line allows %0d", cycle - t0, N * 10 * SET));
    check(cycle - t0 >= N * 10 * SET - SET, "exchange faster than the baud rate allows");
    $display("exchange took %0d cycles for %0d characters each way", cycle - t0, N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (N * 20 * SET + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired, A got %0d, B got %0d", a_got, b_got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
