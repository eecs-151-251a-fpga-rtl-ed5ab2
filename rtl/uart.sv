// uart: the serial device, a transmitter and a receiver packaged together.
//
// The two halves are independent: data_in/data_in_valid/data_in_ready is the
// transmit side's ready/valid sink, data_out/data_out_valid/data_out_ready the
// receive side's ready/valid source. serial_in and serial_out are the two pins
// of the serial port (idle high). Both halves must be built for the same
// CLOCK_FREQ / BAUD_RATE as the device at the other end of the line.
//
// serial_out is driven from a flip-flop, so the pin never glitches and can be
// placed in the I/O cell; this adds one cycle between the transmitter and the
// pin. The incoming line is synchronised inside the receiver. Pairing the two
// halves follows the lab text; the output flip-flop is this design's choice.
module uart #(
  parameter int unsigned CLOCK_FREQ = 125_000_000,
  parameter int unsigned BAUD_RATE  = 115_200
) (
  input  logic       clk,
  input  logic       reset,

  input  logic [7:0] data_in,
  input  logic       data_in_valid,
  output logic       data_in_ready,

  output logic [7:0] data_out,
  output logic       data_out_valid,
  input  logic       data_out_ready,

  input  logic       serial_in,
  output logic       serial_out
);

  logic tx_line;

  uart_transmitter #(.CLOCK_FREQ(CLOCK_FREQ), .BAUD_RATE(BAUD_RATE)) u_tx (
    .clk, .reset,
    .data_in, .data_in_valid, .data_in_ready,
    .serial_out(tx_line)
  );

  uart_receiver #(.CLOCK_FREQ(CLOCK_FREQ), .BAUD_RATE(BAUD_RATE)) u_rx (
    .clk, .reset,
    .data_out, .data_out_valid, .data_out_ready,
    .serial_in
  );

  always_ff @(posedge clk) begin
    if (reset) serial_out <= 1'b1;
    else       serial_out <= tx_line;
  end

endmodule
