// lab5_pkg: types and helpers shared by the serial (UART) and audio (I2S)
// blocks.
//
// The UART carries 8-bit characters framed by one start bit (0) and one stop
// bit (1), so a frame is 10 symbols long. The echo path inverts the case of
// ASCII letters and leaves every other character alone; invert_case() is that
// rule, shared by the echo buffer and its testbenches.
package lab5_pkg;

  typedef logic [7:0] char_t;

  localparam int unsigned UART_DATA_BITS  = 8;
  localparam int unsigned UART_FRAME_BITS = UART_DATA_BITS + 2;  // start + data + stop

  // I2S channel, in the order they are sent within one LRCK period:
  // LRCK low carries the left sample, LRCK high the right one.
  typedef enum logic {CH_LEFT = 1'b0, CH_RIGHT = 1'b1} channel_e;

  // Upper-case letters become lower case and vice versa; anything else
  // is returned unchanged. ASCII letter case differs only in bit 5.
  function automatic char_t invert_case(input char_t c);
    if ((c >= 8'h41 && c <= 8'h5A) || (c >= 8'h61 && c <= 8'h7A))
      return c ^ 8'h20;
    return c;
  endfunction

endpackage
