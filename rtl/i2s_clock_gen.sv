// i2s_clock_gen: the three I2S clocks, derived from the system clock.
//
// MCLK (master clock), SCLK (bit clock) and LRCK (left/right channel select,
// one period per stereo sample) for an I2S DAC that takes all three from the
// FPGA. With the default numbers:
//   LRCK = SAMPLE_RATE                    = 88.2 kHz
//   MCLK = MCLK_LRCK_RATIO * LRCK         = 128 * 88.2 kHz = 11.2896 MHz
//   SCLK = SCLK_LRCK_RATIO * LRCK         = 64 * 88.2 kHz  = 5.6448 MHz
// Every number is a parameter; nothing derived from them is written in by hand.
//
// 125 MHz is not an integer multiple of 11.2896 MHz (the ratio is 11.07), so
// MCLK comes from a phase accumulator: each system clock cycle adds
// INC = 2 * MCLK / CLOCK_FREQ * 2^ACC_BITS, and every carry out of the
// accumulator is one MCLK half period. MCLK then has the exact average
// frequency; each of its edges lands on a system clock edge, so an edge may be
// up to one system clock period (8 ns) early or late. SCLK and LRCK are counted
// off the same MCLK half periods, so all three stay locked together: every
// SCLK edge coincides with an MCLK edge (a falling one with the default
// ratios), and every LRCK edge with an SCLK falling edge, as I2S requires
// (data changes on SCLK falling edges and is sampled on rising ones).
//
// Interface: mclk, sclk and lrck are flip-flop outputs. LRCK is low for the
// left channel and high for the right. sclk_fall is high for the one system
// clock cycle right after each SCLK falling edge; lrck already holds its new
// value in that cycle. Reset leaves all three high, at the end of a right
// channel, so the first MCLK half period after reset starts a left channel
// with falling edges of all three clocks.
//
// The clock ratios and rates follow the lab text. The SCLK/LRCK ratio of 64
// (32 SCLK periods per channel, enough for 24-bit samples) and the phase
// accumulator are this design's own choices.
module i2s_clock_gen #(
  parameter int unsigned CLOCK_FREQ      = 125_000_000,
  parameter int unsigned SAMPLE_RATE     = 88_200,
  parameter int unsigned MCLK_LRCK_RATIO = 128,
  parameter int unsigned SCLK_LRCK_RATIO = 64,
  parameter int unsigned ACC_BITS        = 32
) (
  input  logic clk,
  input  logic reset,

  output logic mclk,
  output logic sclk,
  output logic lrck,
  output logic sclk_fall
);

  localparam longint unsigned SYS_FREQ  = longint'(CLOCK_FREQ);
  localparam longint unsigned MCLK_FREQ = longint'(SAMPLE_RATE) * MCLK_LRCK_RATIO;
  // Rounded to the nearest integer.
  localparam longint unsigned INC =
      ((2 * MCLK_FREQ << ACC_BITS) + SYS_FREQ / 2) / SYS_FREQ;
  // MCLK half periods per SCLK period, and SCLK periods per LRCK period.
  localparam int unsigned HALVES_PER_SCLK = 2 * MCLK_LRCK_RATIO / SCLK_LRCK_RATIO;
  localparam int unsigned HW = $clog2(HALVES_PER_SCLK);
  localparam int unsigned SW = $clog2(SCLK_LRCK_RATIO);

  initial begin
    if (4 * MCLK_FREQ > SYS_FREQ)
      $fatal(1, "each MCLK half period must span at least two system clock cycles");
    if (HALVES_PER_SCLK < 2 || HALVES_PER_SCLK % 2 != 0 ||
        (2 * MCLK_LRCK_RATIO) % SCLK_LRCK_RATIO != 0)
      $fatal(1, "MCLK_LRCK_RATIO must be a whole multiple of SCLK_LRCK_RATIO");
    if (SCLK_LRCK_RATIO < 2 || SCLK_LRCK_RATIO % 2 != 0)
      $fatal(1, "SCLK_LRCK_RATIO must be even");
  end

  logic [ACC_BITS-1:0] acc;
  logic                carry;
  logic [ACC_BITS-1:0] acc_sum;
  logic [HW-1:0]       half;   // MCLK half period within the SCLK period
  logic [SW-1:0]       slot;   // SCLK period within the LRCK period

  assign {carry, acc_sum} = {1'b0, acc} + (ACC_BITS+1)'(INC);

  logic          half_wrap;
  logic [HW-1:0] half_next;
  logic [SW-1:0] slot_next;
  always_comb begin
    half_wrap = (half == HW'(HALVES_PER_SCLK - 1));
    half_next = half_wrap ? '0 : half + 1'b1;
    slot_next = slot;
    if (half_wrap)
      slot_next = (slot == SW'(SCLK_LRCK_RATIO - 1)) ? '0 : slot + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      acc       <= '0;
      half      <= HW'(HALVES_PER_SCLK - 1);
      slot      <= SW'(SCLK_LRCK_RATIO - 1);
      mclk      <= 1'b1;
      sclk      <= 1'b1;
      lrck      <= 1'b1;
      sclk_fall <= 1'b0;
    end else begin
      acc       <= acc_sum;
      sclk_fall <= 1'b0;
      if (carry) begin
        half      <= half_next;
        slot      <= slot_next;
        mclk      <= ~mclk;
        sclk      <= (half_next >= HW'(HALVES_PER_SCLK / 2));
        lrck      <= (slot_next >= SW'(SCLK_LRCK_RATIO / 2));
        sclk_fall <= half_wrap;
      end
    end
  end

endmodule
