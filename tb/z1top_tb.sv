// z1top_tb: end-to-end test of the whole FPGA design at its default numbers
// (125 MHz clock, 115200 baud, 24-bit I2S audio at 88.2 kHz).
//
// Serial echo: a second UART plays the workstation. It types a line of text
// with upper- and lower-case letters, digits, punctuation and spaces, as fast
// as the line allows (frames back to back), with a clock 0.7% faster than the
// FPGA's, so characters arrive slightly faster than the FPGA can send them
// back and the echo buffer has to wait for the transmitter. Every character
// that comes back
// must be the one typed with the case of letters inverted, in order, and the
// whole line must come back within one frame time of the typing ending.
//
// Audio: random sample pairs are presented and replaced at every audio_ack; a
// DAC model decodes SDIN at SCLK rising edges and must get every sample back.
//
// The mechanisms of the design are counted and each must occur at least once:
// upper-to-lower and lower-to-upper conversion, a non-letter passed unchanged,
// back-to-back received frames, the echo buffer waiting on a busy transmitter,
// the echo transmitter sending back to back, and I2S frames with the sample
// handoff and padding slots.
module z1top_tb;
  localparam int    SET  = 125_000_000 / 115_200;   // 1085 cycles per bit
  // The workstation's clock runs 0.7% fast: 1077 cycles per bit.
  localparam int    HOST_BAUD = 116_000;
  localparam int    HOST_SET  = 125_000_000 / HOST_BAUD;
  localparam string TEXT = "Hello, World! 151 zAqX~";

  logic clk = 1'b0, reset = 1'b1;
  always #4 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic        rx_pin, tx_pin;
  logic [23:0] audio_left = 24'h123456, audio_right = 24'hFEDCBA;
  logic        audio_ack, i2s_mclk, i2s_sclk, i2s_lrck, i2s_sdin;

  z1top dut (
    .CLK_125MHZ_FPGA(clk), .reset,
    .FPGA_SERIAL_RX(rx_pin), .FPGA_SERIAL_TX(tx_pin),
    .audio_left, .audio_right, .audio_ack,
    .i2s_mclk, .i2s_sclk, .i2s_lrck, .i2s_sdin
  );

  // The workstation's UART.
  logic [7:0] host_tx, host_rx;
  logic       host_tx_valid = 1'b0, host_tx_ready, host_rx_valid;
  uart #(.BAUD_RATE(HOST_BAUD)) host (
    .clk, .reset,
    .data_in(host_tx), .data_in_valid(host_tx_valid), .data_in_ready(host_tx_ready),
    .data_out(host_rx), .data_out_valid(host_rx_valid), .data_out_ready(1'b1),
    .serial_in(tx_pin), .serial_out(rx_pin)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  function automatic logic [7:0] flip(input logic [7:0] c);
    if (c >= "A" && c <= "Z") return c + 8'd32;
    if (c >= "a" && c <= "z") return c - 8'd32;
    return c;
  endfunction

  // ---- mechanism counters ----
  int to_lower = 0, to_upper = 0, unchanged = 0;
  int rx_back_to_back = 0, echo_stall = 0, tx_back_to_back = 0;
  int echoed = 0, typed = 0;

  always @(posedge clk) if (!reset) begin
    if (host_tx_valid && host_tx_ready) typed++;
    if (host_rx_valid) begin
      automatic logic [7:0] c = TEXT[echoed % TEXT.len()];
      check(echoed < TEXT.len() && host_rx == flip(c),
            $sformatf("typed '%c' (%02h), echoed %02h", c, c, host_rx));
      if (host_rx == c) unchanged++;
      else if (c >= "A" && c <= "Z") to_lower++;
      else to_upper++;
      echoed++;
    end
    // Inside the FPGA: the buffer holds a character the transmitter cannot take yet.
    if (dut.tx_valid && !dut.tx_ready) echo_stall++;
  end

  // Frame starts on each line, to see back-to-back traffic.
  int   rx_last_end = -1, tx_last_end = -1, tx_frame_start = 0;
  logic prx = 1'b1, ptx = 1'b1;
  bit   rx_in_frame = 0, tx_in_frame = 0;
  int   rx_frame_start = 0;
  always @(posedge clk) if (!reset) begin
    if (!rx_in_frame && prx && !rx_pin) begin
      rx_in_frame = 1; rx_frame_start = cycle;
      if (cycle == rx_last_end) rx_back_to_back++;
    end else if (rx_in_frame && cycle == rx_frame_start + 10 * HOST_SET - 1) begin
      rx_in_frame = 0; rx_last_end = cycle + 1;
    end
    if (!tx_in_frame && ptx && !tx_pin) begin
      tx_in_frame = 1; tx_frame_start = cycle;
      if (cycle == tx_last_end) tx_back_to_back++;
    end else if (tx_in_frame && cycle == tx_frame_start + 10 * SET - 1) begin
      tx_in_frame = 0; tx_last_end = cycle + 1;
    end
    prx = rx_pin; ptx = tx_pin;
  end

  // Typing: valid held high, next character after each handshake.
  always @(negedge clk) if (!reset) begin
    host_tx_valid <= (typed < TEXT.len());
    host_tx       <= TEXT[typed % TEXT.len()];
  end

  // ---- audio ----
  logic [23:0] exp_left[$], exp_right[$];
  always @(posedge clk) if (!reset && audio_ack) begin
    exp_left.push_back(audio_left);
    exp_right.push_back(audio_right);
    audio_left  <= 24'($urandom);
    audio_right <= 24'($urandom);
  end

  logic        ps = 1'b1, lr_prev = 1'b1;
  int          k = 0, left_ok = 0, right_ok = 0, pad_bits = 0, acks = 0;
  logic [23:0] shreg;
  always @(posedge clk) if (!reset) begin
    if (audio_ack) acks++;
    if (i2s_sclk && !ps) begin
      if (i2s_lrck != lr_prev) k = 0;
      else k++;
      lr_prev = i2s_lrck;
      if (k >= 1 && k <= 24) shreg = {shreg[22:0], i2s_sdin};
      else if (k > 24) begin
        check(!i2s_sdin, "padding bit not zero");
        pad_bits++;
      end
      if (k == 24) begin
        if (!i2s_lrck) begin
          check(exp_left.size() > 0 && shreg == exp_left[0], $sformatf("left sample %06h wrong", shreg));
          if (exp_left.size() > 0) void'(exp_left.pop_front());
          left_ok++;
        end else begin
          check(exp_right.size() > 0 && shreg == exp_right[0], $sformatf("right sample %06h wrong", shreg));
          if (exp_right.size() > 0) void'(exp_right.pop_front());
          right_ok++;
        end
      end
    end
    ps = i2s_sclk;
  end

  initial begin
    int typing_done;
    repeat (5) @(negedge clk);
    reset = 1'b0;
    wait (typed == TEXT.len());
    typing_done = cycle;
    wait (echoed == TEXT.len());
    // The last character still has to be sent (10 symbols) and received back
    // (9.5 symbols) after its handshake, plus the echo backlog that built up
    // (10 * (SET - HOST_SET) = 80 cycles per character) and a few pipeline
    // cycles.
    check(cycle - typing_done <= 20 * SET + 10 * (SET - HOST_SET) * TEXT.len() + 20,
          $sformatf("last echo %0d cycles after the last handshake", cycle - typing_done));
    repeat (3 * SET) @(negedge clk);
    check(echoed == TEXT.len(), "extra characters echoed");
    check(to_lower > 0,        "no upper-case letter converted");
    check(to_upper > 0,        "no lower-case letter converted");
    check(unchanged > 0,       "no non-letter passed through");
    check(rx_back_to_back > 0, "no back-to-back frames into the FPGA");
    check(tx_back_to_back > 0, "no back-to-back echo frames");
    check(echo_stall > 0,      "echo buffer never waited for the transmitter");
    check(left_ok > 0 && right_ok > 0 && acks > 0, "no complete audio frame");
    check(pad_bits > 0,        "no I2S padding slots");
    $display("echoed=%0d to_lower=%0d to_upper=%0d unchanged=%0d rx_b2b=%0d tx_b2b=%0d stall_cycles=%0d",
             echoed, to_lower, to_upper, unchanged, rx_back_to_back, tx_back_to_back, echo_stall);
    $display("audio: left=%0d right=%0d acks=%0d pad_bits=%0d", left_ok, right_ok, acks, pad_bits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat ((TEXT.len() + 4) * 10 * SET * 2) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired, typed %0d echoed %0d", typed, echoed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
