// echo_fsm: the one-character buffer between the UART's receive and transmit
// sides.
//
// It repeatedly pulls a character from the receiver over ready/valid, inverts
// its case if it is an ASCII letter (A-Z <-> a-z; anything else passes
// unchanged), and pushes the result to the transmitter over ready/valid.
//
// Two states: EMPTY (rx_ready high, waiting for a character) and FULL
// (tx_valid high with the converted character, waiting for the transmitter).
// A character is taken on a clock edge with rx_valid && rx_ready and handed on
// at an edge with tx_valid && tx_ready; the buffer is EMPTY again right after
// that edge, so one character moves per two or more cycles, far faster than
// the serial line. The case conversion is done on the way in.
//
// What the buffer does follows the lab text; holding exactly one character
// and converting on the way in are this design's choices.
module echo_fsm (
  input  logic       clk,
  input  logic       reset,

  input  logic [7:0] rx_data,
  input  logic       rx_valid,
  output logic       rx_ready,

  output logic [7:0] tx_data,
  output logic       tx_valid,
  input  logic       tx_ready
);
  import lab5_pkg::*;

  typedef enum logic {EMPTY, FULL} state_e;
  state_e state;
  char_t  buffer;

  always_ff @(posedge clk) begin
    if (reset) begin
      state  <= EMPTY;
      buffer <= '0;
    end else begin
      unique case (state)
        EMPTY: if (rx_valid) begin
          buffer <= invert_case(rx_data);
          state  <= FULL;
        end
        FULL: if (tx_ready) state <= EMPTY;
      endcase
    end
  end

  assign rx_ready = (state == EMPTY);
  assign tx_valid = (state == FULL);
  assign tx_data  = buffer;

  a_tx_held: assert property (@(posedge clk) disable iff (reset)
    tx_valid && !tx_ready |=> tx_valid && $stable(tx_data));

endmodule
