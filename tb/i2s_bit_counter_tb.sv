// i2s_bit_counter_tb: checks the slot and bit bookkeeping of the I2S bit
// counter with 24-bit samples in 32-slot channels.
//
// The test plays the clock generator's part: it pulses sclk_fall every few
// cycles (random spacing) and flips lrck every 32 pulses, as LRCK does. After
// each strobe it compares slot, channel, bit_index, bit_valid and new_channel
// with the I2S layout: slot 0 of each channel is the one-bit delay, slots
// 1..24 carry bits 23 down to 0, and slots 25..31 are padding.
module i2s_bit_counter_tb;
  localparam int BIT_DEPTH = 24;
  localparam int SLOTS     = 32;
  localparam int FRAMES    = 6;

  logic clk = 1'b0, reset = 1'b1;
  always #4 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic             sclk_fall = 1'b0, lrck = 1'b1;
  logic [4:0]       slot;
  lab5_pkg::channel_e channel;
  logic             new_channel, bit_valid;
  logic [4:0]       bit_index;

  i2s_bit_counter dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  int msb_seen = 0, lsb_seen = 0, pad_seen = 0, channels = 0;

  initial begin
    repeat (3) @(negedge clk);
    reset = 1'b0;
    check(slot == 5'(SLOTS - 1) && channel == lab5_pkg::CH_RIGHT && !bit_valid, "reset state");
    for (int n = 0; n < FRAMES * 2 * SLOTS; n++) begin
      automatic int s  = n % SLOTS;
      automatic bit ch = (n / SLOTS) % 2;   // 0 = left, 1 = right
      repeat ($urandom_range(1, 6)) @(negedge clk);
      sclk_fall = 1'b1;
      lrck      = ch;
      @(negedge clk);
      sclk_fall = 1'b0;
      check(slot == 5'(s), $sformatf("slot %0d, expected %0d", slot, s));
      check(channel == lab5_pkg::channel_e'(ch), "channel");
      check(new_channel == (s == 0), "new_channel pulse");
      if (s >= 1 && s <= BIT_DEPTH) begin
        check(bit_valid && bit_index == 5'(BIT_DEPTH - s),
              $sformatf("slot %0d: bit %0d valid %0d, expected bit %0d", s, bit_index, bit_valid, BIT_DEPTH - s));
        if (s == 1) msb_seen++;
        if (s == BIT_DEPTH) lsb_seen++;
      end else begin
        check(!bit_valid, $sformatf("slot %0d should carry no sample bit", s));
        if (s > BIT_DEPTH) pad_seen++;
      end
      if (s == 0) channels++;
      @(negedge clk);
      check(!new_channel, "new_channel longer than one cycle");
    end
    check(msb_seen == 2 * FRAMES && lsb_seen == 2 * FRAMES && pad_seen > 0, "layout not covered");
    $display("channels=%0d msb=%0d lsb=%0d pad=%0d", channels, msb_seen, lsb_seen, pad_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (FRAMES * 2 * SLOTS * 10 + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
