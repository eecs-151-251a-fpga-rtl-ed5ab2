// i2s_bit_counter: which bit of which sample belongs in the current SCLK slot.
//
// In I2S each LRCK half period (one channel) holds SLOTS = SCLK_LRCK_RATIO / 2
// SCLK periods, or slots. The sample is sent most significant bit first,
// starting one SCLK period after the LRCK edge: slot 0 of a channel carries no
// bit of it, slot 1 carries bit BIT_DEPTH-1 (the MSB), slot BIT_DEPTH carries
// bit 0 (the LSB), and the slots after that are padding, sent as zero.
//
// The counter follows the clock generator: on each sclk_fall strobe it moves
// to the next slot, and when LRCK has changed since the previous strobe it
// restarts at slot 0 of the channel LRCK now selects (low = left).
//
// Interface: slot, channel, bit_index and bit_valid are valid from the cycle
// after the sclk_fall strobe (that is, two system clock cycles after SCLK
// falls) until the next one, well before the SCLK rising edge at which the DAC
// samples. bit_valid is low in slot 0 and in the padding slots. new_channel is
// a one-cycle pulse in the first cycle of slot 0. Reset puts the counter at the
// last slot of a right channel, matching the clock generator's reset state.
//
// The MSB-first order and the one-SCLK delay follow the I2S timing that the
// lab follows; the strobe-driven structure and the reset state are this
// design's choices. BIT_DEPTH must be smaller than SLOTS, so the LSB always
// falls inside its own channel.
module i2s_bit_counter #(
  parameter int unsigned BIT_DEPTH       = 24,
  parameter int unsigned SCLK_LRCK_RATIO = 64,
  localparam int unsigned SLOTS = SCLK_LRCK_RATIO / 2,
  localparam int unsigned SLW   = $clog2(SLOTS),
  localparam int unsigned BIW   = $clog2(BIT_DEPTH)
) (
  input  logic             clk,
  input  logic             reset,

  input  logic             sclk_fall,
  input  logic             lrck,

  output logic [SLW-1:0]   slot,
  output lab5_pkg::channel_e channel,
  output logic             new_channel,
  output logic [BIW-1:0]   bit_index,
  output logic             bit_valid
);
  import lab5_pkg::*;

  initial begin
    if (BIT_DEPTH < 2 || BIT_DEPTH >= SLOTS)
      $fatal(1, "BIT_DEPTH must be below SCLK_LRCK_RATIO / 2");
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      slot        <= SLW'(SLOTS - 1);
      channel     <= CH_RIGHT;
      new_channel <= 1'b0;
    end else begin
      new_channel <= 1'b0;
      if (sclk_fall) begin
        if (channel_e'(lrck) != channel) begin
          slot        <= '0;
          channel     <= channel_e'(lrck);
          new_channel <= 1'b1;
        end else if (slot != SLW'(SLOTS - 1)) begin
          slot <= slot + 1'b1;
        end
      end
    end
  end

  always_comb begin
    bit_valid = (slot >= SLW'(1)) && (slot <= SLW'(BIT_DEPTH));
    bit_index = bit_valid ? BIW'(BIT_DEPTH - 32'(slot)) : '0;
  end

endmodule
