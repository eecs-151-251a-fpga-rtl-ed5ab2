// uart_transmitter: the transmit half of the UART.
//
// A character offered on the ready/valid input is framed as a start bit (0),
// eight data bits sent least significant bit first, and a stop bit (1). The
// ten bits are shifted out of a shift register onto serial_out, each held for
// SYMBOL_EDGE_TIME = CLOCK_FREQ / BAUD_RATE system clock cycles. The line
// rests high when idle.
//
// Interface: data_in/data_in_valid/data_in_ready is a ready/valid sink; a
// character is taken on a rising clock edge where valid and ready are both
// high. The start bit appears on serial_out right after that edge.
//
// Timing: a frame lasts exactly 10 * SYMBOL_EDGE_TIME cycles. data_in_ready is
// high while idle and also in the last cycle of a frame, so a character that
// is waiting is sent straight after the stop bit with no idle gap: back-to-back
// frames start every 10 * SYMBOL_EDGE_TIME cycles.
//
// The frame format, the shift-register structure and the symbol time follow
// the lab text. Accepting the next character in the last cycle of the stop bit
// and the synchronous active-high reset are this design's own choices.
module uart_transmitter #(
  parameter int unsigned CLOCK_FREQ = 125_000_000,
  parameter int unsigned BAUD_RATE  = 115_200
) (
  input  logic       clk,
  input  logic       reset,

  input  logic [7:0] data_in,
  input  logic       data_in_valid,
  output logic       data_in_ready,

  output logic       serial_out
);
  import lab5_pkg::*;

  localparam int unsigned SYMBOL_EDGE_TIME = CLOCK_FREQ / BAUD_RATE;
  localparam int unsigned CW = $clog2(SYMBOL_EDGE_TIME);
  localparam int unsigned BW = $clog2(UART_FRAME_BITS);

  initial begin
    if (SYMBOL_EDGE_TIME < 2) $fatal(1, "CLOCK_FREQ / BAUD_RATE must be at least 2");
  end

  logic                       busy;
  logic [UART_FRAME_BITS-1:0] shifter;   // bit 0 is on the line
  logic [CW-1:0]              clk_count; // cycles into the current symbol
  logic [BW-1:0]              bit_count; // symbol index within the frame

  logic symbol_end, frame_end, fire;
  assign symbol_end    = (clk_count == CW'(SYMBOL_EDGE_TIME - 1));
  assign frame_end     = busy && symbol_end && (bit_count == BW'(UART_FRAME_BITS - 1));
  assign data_in_ready = !busy || frame_end;
  assign fire          = data_in_valid && data_in_ready;

  always_ff @(posedge clk) begin
    if (reset) begin
      busy      <= 1'b0;
      shifter   <= '1;
      clk_count <= '0;
      bit_count <= '0;
    end else if (fire) begin
      busy      <= 1'b1;
      shifter   <= {1'b1, data_in, 1'b0};
      clk_count <= '0;
      bit_count <= '0;
    end else if (busy) begin
      if (symbol_end) begin
        clk_count <= '0;
        shifter   <= {1'b1, shifter[UART_FRAME_BITS-1:1]};
        if (frame_end) begin
          busy      <= 1'b0;
          bit_count <= '0;
        end else begin
          bit_count <= bit_count + 1'b1;
        end
      end else begin
        clk_count <= clk_count + 1'b1;
      end
    end
  end

  assign serial_out = busy ? shifter[0] : 1'b1;

  // A frame in progress never shifts more than its ten symbols.
  a_bit_range: assert property (@(posedge clk) disable iff (reset)
    busy |-> (bit_count < BW'(UART_FRAME_BITS)));

endmodule
