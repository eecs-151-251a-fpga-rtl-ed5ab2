// i2s_clock_gen_tb: checks the three I2S clocks at their default rates
// (125 MHz system clock, 88.2 kHz LRCK, MCLK = 128 x LRCK, SCLK = 64 x LRCK).
//
// Over FRAMES LRCK periods it counts MCLK and SCLK periods in each LRCK
// period, checks that LRCK is low for exactly half of its SCLK periods, that
// every SCLK edge falls on an MCLK edge and every LRCK edge on an SCLK falling
// edge, that the sclk_fall strobe marks exactly the cycle after each SCLK
// falling edge, that each MCLK half period is 5 or 6 system cycles (125 MHz /
// 22.5792 MHz = 5.54), and that the average LRCK period matches
// 125e6 / 88200 = 1417.23 system cycles to within one cycle over the run.
module i2s_clock_gen_tb;
  localparam int FRAMES = 40;
  localparam real LRCK_CYCLES = 125.0e6 / 88.2e3;

  logic clk = 1'b0, reset = 1'b1;
  always #4 clk = ~clk;   // 125 MHz
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic mclk, sclk, lrck, sclk_fall;
  i2s_clock_gen dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  logic pm = 1'b1, ps = 1'b1, pl = 1'b1, started = 1'b0;
  int   mclk_rise = 0, sclk_rise = 0, sclk_rise_low = 0, frames = 0;
  int   half_len = 0, first_fall = -1, last_fall = -1, min_half = 99, max_half = 0;

  always @(posedge clk) if (!reset) begin
    // Values seen here were set at the previous edge; compare with the edge before.
    automatic bit m_edge = (mclk != pm);
    automatic bit s_edge = (sclk != ps);
    automatic bit l_edge = (lrck != pl);
    check(sclk_fall == (ps && !sclk) || !started, "sclk_fall does not mark the SCLK falling edge");
    if (s_edge) check(m_edge, "SCLK edge without an MCLK edge");
    if (l_edge) check(s_edge && !sclk, "LRCK edge not on an SCLK falling edge");
    half_len++;
    if (m_edge) begin
      if (started && first_fall >= 0) begin
        if (half_len < min_half) min_half = half_len;
        if (half_len > max_half) max_half = half_len;
      end
      half_len = 0;
      if (mclk) mclk_rise++;
    end
    if (s_edge && sclk) begin
      sclk_rise++;
      if (!lrck) sclk_rise_low++;
    end
    if (l_edge && !lrck) begin   // LRCK falls: a frame ends and the next begins
      if (first_fall >= 0) begin
        check(mclk_rise == 128, $sformatf("%0d MCLK periods in an LRCK period", mclk_rise));
        check(sclk_rise == 64, $sformatf("%0d SCLK periods in an LRCK period", sclk_rise));
        check(sclk_rise_low == 32, $sformatf("%0d SCLK periods with LRCK low", sclk_rise_low));
        frames++;
      end else begin
        first_fall = cycle;
      end
      last_fall = cycle;
      mclk_rise = 0; sclk_rise = 0; sclk_rise_low = 0;
    end
    started = 1'b1;
    pm = mclk; ps = sclk; pl = lrck;
  end

  initial begin
    repeat (3) @(negedge clk);
    check(mclk && sclk && lrck, "clocks not high in reset");
    reset = 1'b0;
    wait (frames == FRAMES);
    @(negedge clk);
    begin
      real avg;
      avg = real'(last_fall - first_fall) / FRAMES;
      check(avg > LRCK_CYCLES - 1.0 / FRAMES && avg < LRCK_CYCLES + 1.0 / FRAMES,
            $sformatf("average LRCK period %f cycles, expected %f", avg, LRCK_CYCLES));
      check(min_half == 5 && max_half == 6, $sformatf("MCLK half periods %0d..%0d cycles", min_half, max_half));
      $display("LRCK period %f cycles (%f kHz), MCLK half periods %0d..%0d cycles",
               avg, 125.0e3 / avg, min_half, max_half);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (int'(LRCK_CYCLES) * (FRAMES + 3)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired after %0d frames", frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
