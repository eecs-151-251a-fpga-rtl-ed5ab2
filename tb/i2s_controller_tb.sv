// i2s_controller_tb: the I2S controller at its default numbers, read back by
// an I2S receiver model of the DAC.
//
// The sample source presents random 24-bit left/right pairs and replaces them
// whenever sample_ack pulses. The receiver model watches SCLK: at each rising
// edge it samples LRCK and SDIN as the DAC would. The first rising edge after
// LRCK changes is the one-bit delay; the next 24 carry the sample MSB first;
// the remaining ones of the channel must be zero. Each decoded sample must
// equal the one the source presented at the matching sample_ack. SDIN may only
// change while SCLK is low (it must be stable around each rising edge).
module i2s_controller_tb;
  localparam int FRAMES = 12;
  localparam int BIT_DEPTH = 24;

  logic clk = 1'b0, reset = 1'b1;
  always #4 clk = ~clk;   // 125 MHz
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic [23:0] left_sample = '0, right_sample = '0;
  logic        sample_ack, mclk, sclk, lrck, sdin;

  i2s_controller dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  logic [23:0] exp_left[$], exp_right[$];

  // Source: new random pair after each acknowledgement.
  always @(posedge clk) if (!reset && sample_ack) begin
    exp_left.push_back(left_sample);
    exp_right.push_back(right_sample);
    left_sample  <= 24'($urandom);
    right_sample <= 24'($urandom);
  end

  // DAC model.
  logic        ps = 1'b1, psdin = 1'b0, lr_prev = 1'b1;
  int          k = 0;          // rising edges since the LRCK change
  logic [23:0] shreg;
  int          left_ok = 0, right_ok = 0, pad_bits = 0;

  always @(posedge clk) if (!reset) begin
    if (sdin != psdin) check(!sclk && !ps, "SDIN changed while SCLK high or rising");
    if (sclk && !ps) begin   // SCLK rising edge
      if (lrck != lr_prev) k = 0;
      else k++;
      lr_prev = lrck;
      if (k >= 1 && k <= BIT_DEPTH) shreg = {shreg[22:0], sdin};
      else if (k > BIT_DEPTH) begin
        check(!sdin, "padding bit not zero");
        pad_bits++;
      end
      if (k == BIT_DEPTH) begin
        if (!lrck) begin
          check(exp_left.size() > 0 && shreg == exp_left[0],
                $sformatf("left %06h, expected %06h", shreg, exp_left.size() > 0 ? exp_left[0] : 24'h0));
          if (exp_left.size() > 0) void'(exp_left.pop_front());
          left_ok++;
        end else begin
          check(exp_right.size() > 0 && shreg == exp_right[0],
                $sformatf("right %06h, expected %06h", shreg, exp_right.size() > 0 ? exp_right[0] : 24'h0));
          if (exp_right.size() > 0) void'(exp_right.pop_front());
          right_ok++;
        end
      end
    end
    ps    = sclk;
    psdin = sdin;
  end

  initial begin
    left_sample  = 24'h800001;   // extreme codes first
    right_sample = 24'h7FFFFE;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    wait (right_ok == FRAMES);
    @(negedge clk);
    check(left_ok == FRAMES, "left and right channel counts differ");
    check(pad_bits == (FRAMES * 2 - 1) * 7, "padding slots missing");   // the last channel is cut at its LSB
    $display("frames=%0d pad_bits=%0d", right_ok, pad_bits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (1418 * (FRAMES + 3)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired after %0d frames", right_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
