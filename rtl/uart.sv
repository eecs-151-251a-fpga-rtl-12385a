// uart: a full-duplex UART built from one receiver and one transmitter.
//
// The two halves are independent: the receiver turns serial_in into
// characters offered on data_out / data_out_valid / data_out_ready, and the
// transmitter sends characters taken on data_in / data_in_valid /
// data_in_ready out on serial_out. Both serial lines pass through one
// register each, placed next to the pins (the I/O-block registers of an
// FPGA), so the pin is driven and sampled by a clean flip-flop. Both
// registers reset to 1, the idle level of the line.
//
// Timing: each register adds one cycle of latency on its line; otherwise the
// timing is that of uart_receiver and uart_transmitter.
//
// The structure (receiver, transmitter and two pin registers) follows the lab
// text; the reset value of the pin registers is this design's choice.
module uart
  import uart_pkg::*;
#(
  parameter int unsigned CLOCK_FREQ = DEFAULT_CLOCK_FREQ,
  parameter int unsigned BAUD_RATE  = DEFAULT_BAUD_RATE
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

  (* iob = "true" *) logic serial_in_q;
  (* iob = "true" *) logic serial_out_q;
  logic tx_line;

  always_ff @(posedge clk) begin
    if (reset) begin
      serial_in_q  <= 1'b1;
      serial_out_q <= 1'b1;
    end else begin
      serial_in_q  <= serial_in;
      serial_out_q <= tx_line;
    end
  end

  assign serial_out = serial_out_q;

  uart_receiver #(
    .CLOCK_FREQ (CLOCK_FREQ),
    .BAUD_RATE  (BAUD_RATE)
  ) u_rx (
    .clk            (clk),
    .reset          (reset),
    .serial_in      (serial_in_q),
    .data_out       (data_out),
    .data_out_valid (data_out_valid),
    .data_out_ready (data_out_ready)
  );

  uart_transmitter #(
    .CLOCK_FREQ (CLOCK_FREQ),
    .BAUD_RATE  (BAUD_RATE)
  ) u_tx (
    .clk           (clk),
    .reset         (reset),
    .data_in       (data_in),
    .data_in_valid (data_in_valid),
    .data_in_ready (data_in_ready),
    .serial_out    (tx_line)
  );

endmodule
