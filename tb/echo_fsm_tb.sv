// echo_fsm_tb: self-checking test of the one-character echo buffer.
//
// All 256 character codes are fed in, in a shuffled order, by a source with a
// random valid, while the sink's ready is random too. The characters that come
// out must be the ones that went in, in order, with A-Z and a-z swapped to the
// other case and every other code unchanged (the expected value is worked out
// here from the ASCII table, not from the design's helper). It also checks
// that the buffer never takes a new character while it holds one, and that a
// character it offers stays offered until taken.
module echo_fsm_tb;
  logic clk = 1'b0, reset = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic [7:0] rx_data = '0, tx_data;
  logic       rx_valid = 1'b0, rx_ready, tx_valid, tx_ready = 1'b0;

  echo_fsm dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  function automatic logic [7:0] expected(input logic [7:0] c);
    string upper = "ABCDEFGHIJKLMNOPQRSTUVWXYZ";
    string lower = "abcdefghijklmnopqrstuvwxyz";
    for (int i = 0; i < 26; i++) begin
      if (c == upper[i]) return lower[i];
      if (c == lower[i]) return upper[i];
    end
    return c;
  endfunction

  logic [7:0] order[256];
  int         next_in = 0, next_out = 0, held = 0;
  int         upper_seen = 0, lower_seen = 0, other_seen = 0;
  logic       prev_tx_valid = 1'b0, prev_tx_ready = 1'b0;
  logic [7:0] prev_tx_data;

  always @(posedge clk) if (!reset) begin
    if (tx_valid && rx_ready) check(1'b0, "buffer ready for a new character while full");
    if (prev_tx_valid && !prev_tx_ready) begin
      check(tx_valid && tx_data == prev_tx_data, "offered character withdrawn or changed");
      held++;
    end
    if (rx_valid && rx_ready) next_in++;
    if (tx_valid && tx_ready) begin
      check(next_out < 256 && tx_data == expected(order[next_out]),
            $sformatf("in %02h out %02h", order[next_out % 256], tx_data));
      if (order[next_out % 256] inside {[8'h41:8'h5A]}) upper_seen++;
      else if (order[next_out % 256] inside {[8'h61:8'h7A]}) lower_seen++;
      else other_seen++;
      next_out++;
    end
    prev_tx_valid <= tx_valid;
    prev_tx_ready <= tx_ready;
    prev_tx_data  <= tx_data;
  end

  always @(negedge clk) if (!reset) begin
    rx_valid <= (next_in < 256) && ($urandom_range(0, 2) != 0);
    rx_data  <= order[next_in % 256];
    tx_ready <= ($urandom_range(0, 2) != 0);
  end

  initial begin
    foreach (order[i]) order[i] = 8'(i);
    order.shuffle();
    repeat (3) @(negedge clk);
    reset = 1'b0;
    wait (next_out == 256);
    repeat (5) @(negedge clk);
    check(upper_seen == 26 && lower_seen == 26 && other_seen == 204, "not every character class seen");
    check(held > 0, "sink never stalled the buffer");
    $display("upper=%0d lower=%0d other=%0d stalls=%0d", upper_seen, lower_seen, other_seen, held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired after %0d characters", next_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
