// i2s_controller: I2S master for a stereo audio DAC (such as the CS4344 on a
// Pmod I2S board) that takes all of its clocks from the FPGA.
//
// i2s_clock_gen produces MCLK, SCLK and LRCK from the system clock;
// i2s_bit_counter tracks the slot within each channel and the sample bit that
// belongs in it. This block adds the data path: at the start of every left
// channel it captures left_sample and right_sample (two's complement,
// BIT_DEPTH bits each) and pulses sample_ack for one cycle, so the source can
// present the next pair. sdin then carries the left sample while LRCK is low
// and the right one while it is high, MSB first, starting one SCLK period
// after each LRCK edge, with zeros in the unused slots.
//
// Timing: sdin changes one system clock cycle after the bit counter, three
// system clock cycles after each SCLK falling edge, and is stable at the
// following SCLK rising edge, where the DAC samples it (an SCLK half period
// must therefore last at least three system clock cycles). Default numbers:
// 125 MHz system clock, 24-bit samples at 88.2 kHz, MCLK = 128 x LRCK,
// SCLK = 64 x LRCK.
//
// The clock rates, bit depth and bit order follow the lab text and the I2S
// timing it gives; the SCLK ratio, capturing both samples once per frame and
// the sample_ack handshake are this design's own choices.
module i2s_controller #(
  parameter int unsigned CLOCK_FREQ      = 125_000_000,
  parameter int unsigned SAMPLE_RATE     = 88_200,
  parameter int unsigned MCLK_LRCK_RATIO = 128,
  parameter int unsigned SCLK_LRCK_RATIO = 64,
  parameter int unsigned BIT_DEPTH       = 24
) (
  input  logic                 clk,
  input  logic                 reset,

  input  logic [BIT_DEPTH-1:0] left_sample,
  input  logic [BIT_DEPTH-1:0] right_sample,
  output logic                 sample_ack,

  output logic                 mclk,
  output logic                 sclk,
  output logic                 lrck,
  output logic                 sdin
);
  import lab5_pkg::*;

  localparam int unsigned BIW = $clog2(BIT_DEPTH);

  initial begin
    if (longint'(CLOCK_FREQ) < 6 * longint'(SAMPLE_RATE) * SCLK_LRCK_RATIO)
      $fatal(1, "each SCLK half period must span at least three system clock cycles");
  end

  logic           sclk_fall;
  channel_e       channel;
  logic           new_channel;
  logic [BIW-1:0] bit_index;
  logic           bit_valid;

  i2s_clock_gen #(
    .CLOCK_FREQ(CLOCK_FREQ), .SAMPLE_RATE(SAMPLE_RATE),
    .MCLK_LRCK_RATIO(MCLK_LRCK_RATIO), .SCLK_LRCK_RATIO(SCLK_LRCK_RATIO)
  ) u_clocks (
    .clk, .reset, .mclk, .sclk, .lrck, .sclk_fall
  );

  i2s_bit_counter #(
    .BIT_DEPTH(BIT_DEPTH), .SCLK_LRCK_RATIO(SCLK_LRCK_RATIO)
  ) u_bits (
    .clk, .reset, .sclk_fall, .lrck,
    .slot(), .channel, .new_channel, .bit_index, .bit_valid
  );

  logic [BIT_DEPTH-1:0] left_q, right_q;
  logic                 frame_start;
  assign frame_start = new_channel && (channel == CH_LEFT);

  always_ff @(posedge clk) begin
    if (reset) begin
      left_q     <= '0;
      right_q    <= '0;
      sample_ack <= 1'b0;
      sdin       <= 1'b0;
    end else begin
      sample_ack <= frame_start;
      if (frame_start) begin
        left_q  <= left_sample;
        right_q <= right_sample;
      end
      if (!bit_valid)             sdin <= 1'b0;
      else if (channel == CH_LEFT) sdin <= left_q[bit_index];
      else                         sdin <= right_q[bit_index];
    end
  end

endmodule
