// z1top: FPGA top level of the UART echo design.
//
// One uart connects to the board's serial pins FPGA_SERIAL_RX and
// FPGA_SERIAL_TX. Every character it receives is passed through echo_fsm,
// which swaps the case of ASCII letters, and sent straight back, so a
// terminal on the far end sees its typing echoed with the case inverted.
//
// Interface: clk is the system clock of CLOCK_FREQ Hz (125 MHz by default),
// reset is synchronous and active high, and the two serial pins idle high at
// BAUD_RATE (115200) baud, 8 data bits, no parity, one stop bit.
//
// Timing: a character's echo starts about half a symbol after its own stop
// bit has been sampled, a few clock cycles of pipeline added (pin registers,
// the two-state echo machine).
//
// The echo behaviour and the pin names follow the lab text; the clock
// frequency and the plain reset input are this design's choice.
module z1top
  import uart_pkg::*;
#(
  parameter int unsigned CLOCK_FREQ = DEFAULT_CLOCK_FREQ,
  parameter int unsigned BAUD_RATE  = DEFAULT_BAUD_RATE
) (
  input  logic clk,
  input  logic reset,
  input  logic FPGA_SERIAL_RX,
  output logic FPGA_SERIAL_TX
);

  logic [7:0] rx_data, tx_data;
  logic       rx_valid, rx_ready, tx_valid, tx_ready;

  uart #(
    .CLOCK_FREQ (CLOCK_FREQ),
    .BAUD_RATE  (BAUD_RATE)
  ) u_uart (
    .clk            (clk),
    .reset          (reset),
    .data_in        (tx_data),
    .data_in_valid  (tx_valid),
    .data_in_ready  (tx_ready),
    .data_out       (rx_data),
    .data_out_valid (rx_valid),
    .data_out_ready (rx_ready),
    .serial_in      (FPGA_SERIAL_RX),
    .serial_out     (FPGA_SERIAL_TX)
  );

  echo_fsm u_echo (
    .clk      (clk),
    .reset    (reset),
    .rx_data  (rx_data),
    .rx_valid (rx_valid),
    .rx_ready (rx_ready),
    .tx_data  (tx_data),
    .tx_valid (tx_valid),
    .tx_ready (tx_ready)
  );

endmodule
