// echo_fsm: takes characters from a receiver and hands them, case-swapped,
// to a transmitter.
//
// A two-state machine holding one character. In RECV it raises rx_ready and
// waits for rx_valid; the character taken is stored with the case of an ASCII
// letter (A-Z, a-z) swapped and every other code unchanged. In SEND it offers
// the stored character with tx_valid until tx_ready, then returns to RECV.
// It is therefore the one-character buffer between the receive and transmit
// ready/valid interfaces of the UART.
//
// Timing: one cycle to take a character, at least one cycle to pass it on;
// back-pressure from the transmitter holds the machine in SEND, which in turn
// leaves the receiver's byte waiting (its valid stays high).
//
// What the machine does follows the lab text; the two-state structure and the
// registered character are this design's choice.
module echo_fsm
  import uart_pkg::invert_case;
(
  input  logic       clk,
  input  logic       reset,

  input  logic [7:0] rx_data,
  input  logic       rx_valid,
  output logic       rx_ready,

  output logic [7:0] tx_data,
  output logic       tx_valid,
  input  logic       tx_ready
);

  typedef enum logic {RECV, SEND} state_e;

  state_e     state_q;
  logic [7:0] char_q;

  always_ff @(posedge clk) begin
    if (reset) begin
      state_q <= RECV;
      char_q  <= '0;
    end else begin
      unique case (state_q)
        RECV: if (rx_valid) begin
          char_q  <= invert_case(rx_data);
          state_q <= SEND;
        end
        SEND: if (tx_ready) state_q <= RECV;
        default: state_q <= RECV;
      endcase
    end
  end

  assign rx_ready = (state_q == RECV);
  assign tx_valid = (state_q == SEND);
  assign tx_data  = char_q;

  // A character offered to the transmitter stays offered, unchanged.
  a_tx_held : assert property (@(posedge clk) disable iff (reset)
    tx_valid && !tx_ready |=> tx_valid && $stable(tx_data));

endmodule
