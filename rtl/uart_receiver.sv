// uart_receiver: the receive half of the UART.
//
// serial_in first passes through two flip-flops that bring the asynchronous
// line into the system clock domain. While idle the receiver waits for the line
// to go low (the start bit). From that moment it times the frame in symbols of
// SYMBOL_EDGE_TIME = CLOCK_FREQ / BAUD_RATE cycles and samples the line once
// per symbol, SAMPLE_TIME = SYMBOL_EDGE_TIME / 2 cycles into it, far from the
// edges where the line may be changing. The eight data-bit samples (LSB first)
// are shifted into a shift register; the start and stop samples only mark the
// frame's beginning and end.
//
// Interface: data_out/data_out_valid/data_out_ready is a ready/valid source.
// When the stop bit has been sampled, the has_byte flag is set and
// data_out_valid rises; it stays high until data_out_ready is seen high, then
// drops until the next character is complete.
//
// Timing: the character is offered half a symbol into its stop bit (plus the
// two synchroniser cycles), so the receiver is back in idle before the earliest
// next start bit and back-to-back frames are received. If a new character
// completes while the previous one is still unread, the new one replaces it.
//
// The mid-symbol sampling and the has_byte flag follow the lab text. The
// two-flop synchroniser, overwriting an unread character and the synchronous
// active-high reset are this design's own choices.
module uart_receiver #(
  parameter int unsigned CLOCK_FREQ = 125_000_000,
  parameter int unsigned BAUD_RATE  = 115_200
) (
  input  logic       clk,
  input  logic       reset,

  output logic [7:0] data_out,
  output logic       data_out_valid,
  input  logic       data_out_ready,

  input  logic       serial_in
);
  import lab5_pkg::*;

  localparam int unsigned SYMBOL_EDGE_TIME = CLOCK_FREQ / BAUD_RATE;
  localparam int unsigned SAMPLE_TIME      = SYMBOL_EDGE_TIME / 2;
  localparam int unsigned CW = $clog2(SYMBOL_EDGE_TIME);
  localparam int unsigned BW = $clog2(UART_FRAME_BITS + 1);

  initial begin
    if (SYMBOL_EDGE_TIME < 2) $fatal(1, "CLOCK_FREQ / BAUD_RATE must be at least 2");
  end

  logic [1:0]                 sync;      // synchroniser; sync[1] is safe to use
  logic                       rx;
  logic                       busy;
  logic                       has_byte;
  logic [UART_DATA_BITS-1:0]  shifter;   // newest data bit enters at the top
  logic [UART_DATA_BITS-1:0]  held;      // the character on offer
  logic [CW-1:0]              clk_count;
  logic [BW-1:0]              bit_count; // samples taken so far in this frame

  assign rx = sync[1];

  logic symbol_end, sample_now, last_sample;
  assign symbol_end  = (clk_count == CW'(SYMBOL_EDGE_TIME - 1));
  assign sample_now  = busy && (clk_count == CW'(SAMPLE_TIME));
  assign last_sample = sample_now && (bit_count == BW'(UART_FRAME_BITS - 1));

  always_ff @(posedge clk) begin
    if (reset) sync <= 2'b11;
    else       sync <= {sync[0], serial_in};
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      busy      <= 1'b0;
      clk_count <= '0;
      bit_count <= '0;
      shifter   <= '0;
    end else if (!busy) begin
      clk_count <= '0;
      bit_count <= '0;
      if (!rx) begin
        busy      <= 1'b1;         // start bit: this cycle is cycle 0 of it
        clk_count <= CW'(1);
      end
    end else begin
      clk_count <= symbol_end ? '0 : clk_count + 1'b1;
      if (sample_now) begin
        if (bit_count != '0 && !last_sample)   // data bits only
          shifter <= {rx, shifter[UART_DATA_BITS-1:1]};
        bit_count <= bit_count + 1'b1;
      end
      if (last_sample) busy <= 1'b0;
    end
  end

  // When the stop bit is sampled, the shift register holds the eight data
  // bits; they are copied out so that the next frame can shift in behind them.
  always_ff @(posedge clk) begin
    if (reset)            held <= '0;
    else if (last_sample) held <= shifter;
  end

  always_ff @(posedge clk) begin
    if (reset)                has_byte <= 1'b0;
    else if (last_sample)     has_byte <= 1'b1;
    else if (data_out_ready)  has_byte <= 1'b0;
  end

  assign data_out       = held;
  assign data_out_valid = has_byte;

  // Ready/valid source rule: once offered, a character stays offered and
  // unchanged until it is taken (unless a newer one replaces it).
  a_valid_held: assert property (@(posedge clk) disable iff (reset)
    data_out_valid && !data_out_ready |=> data_out_valid);
  a_data_held: assert property (@(posedge clk) disable iff (reset)
    data_out_valid && !data_out_ready && !last_sample |=> $stable(data_out));

endmodule
