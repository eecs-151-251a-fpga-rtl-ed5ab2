// z1top: FPGA top level of the serial echo and I2S audio clock design.
//
// Serial echo: characters arriving on FPGA_SERIAL_RX are received by the UART,
// pulled from it over ready/valid by a one-character buffer that inverts the
// case of ASCII letters, and pushed back over ready/valid into the UART's
// transmitter, which sends them out on FPGA_SERIAL_TX. A terminal at
// BAUD_RATE (115200 by default, 8 data bits, no parity, one stop bit, no flow
// control) therefore sees every letter it types echoed in the other case.
//
// Audio: the I2S controller drives the clocks and serial data of an external
// stereo DAC: MCLK, SCLK, LRCK and SDIN, with 24-bit samples at 88.2 kHz by
// default. The samples come in on audio_left/audio_right and are captured
// once per frame; audio_ack pulses when they have been taken.
//
// Everything runs on the single 125 MHz system clock CLK_125MHZ_FPGA and is
// reset synchronously by the active-high reset input, which is expected to be
// debounced and synchronised already. The two parts share nothing but clock
// and reset.
//
// The pairing of UART and echo buffer and the I2S rates follow the lab text;
// pin names beyond the two serial pins, and the audio sample ports, are this
// design's choices.
module z1top #(
  parameter int unsigned CLOCK_FREQ      = 125_000_000,
  parameter int unsigned BAUD_RATE       = 115_200,
  parameter int unsigned SAMPLE_RATE     = 88_200,
  parameter int unsigned MCLK_LRCK_RATIO = 128,
  parameter int unsigned SCLK_LRCK_RATIO = 64,
  parameter int unsigned BIT_DEPTH       = 24
) (
  input  logic                 CLK_125MHZ_FPGA,
  input  logic                 reset,

  input  logic                 FPGA_SERIAL_RX,
  output logic                 FPGA_SERIAL_TX,

  input  logic [BIT_DEPTH-1:0] audio_left,
  input  logic [BIT_DEPTH-1:0] audio_right,
  output logic                 audio_ack,
  output logic                 i2s_mclk,
  output logic                 i2s_sclk,
  output logic                 i2s_lrck,
  output logic                 i2s_sdin
);

  logic       clk;
  assign clk = CLK_125MHZ_FPGA;

  logic [7:0] rx_data,  tx_data;
  logic       rx_valid, rx_ready;
  logic       tx_valid, tx_ready;

  uart #(.CLOCK_FREQ(CLOCK_FREQ), .BAUD_RATE(BAUD_RATE)) u_uart (
    .clk, .reset,
    .data_in(tx_data),   .data_in_valid(tx_valid),  .data_in_ready(tx_ready),
    .data_out(rx_data),  .data_out_valid(rx_valid), .data_out_ready(rx_ready),
    .serial_in(FPGA_SERIAL_RX),
    .serial_out(FPGA_SERIAL_TX)
  );

  echo_fsm u_echo (
    .clk, .reset,
    .rx_data, .rx_valid, .rx_ready,
    .tx_data, .tx_valid, .tx_ready
  );

  i2s_controller #(
    .CLOCK_FREQ(CLOCK_FREQ), .SAMPLE_RATE(SAMPLE_RATE),
    .MCLK_LRCK_RATIO(MCLK_LRCK_RATIO), .SCLK_LRCK_RATIO(SCLK_LRCK_RATIO),
    .BIT_DEPTH(BIT_DEPTH)
  ) u_i2s (
    .clk, .reset,
    .left_sample(audio_left), .right_sample(audio_right), .sample_ack(audio_ack),
    .mclk(i2s_mclk), .sclk(i2s_sclk), .lrck(i2s_lrck), .sdin(i2s_sdin)
  );

endmodule
