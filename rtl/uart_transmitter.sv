// uart_transmitter: serialises 8-bit characters onto a UART line.
//
// A character accepted on the ready/valid input is loaded, together with a
// start bit (0) and a stop bit (1), into a ten-bit shift register whose bit 0
// drives the line. Every SYMBOL_EDGE_TIME = CLOCK_FREQ / BAUD_RATE cycles the
// register shifts right by one, filling with ones, so the line sees start bit,
// data[0] .. data[7], stop bit, and then stays high (idle).
//
// Interface: data_in / data_in_valid / data_in_ready follow the usual
// ready/valid rule; a character is taken on a clock edge where both are high.
// serial_out is driven straight from a flip-flop and is high in idle and
// after reset.
//
// Timing: the start bit appears on the cycle after the handshake and every
// symbol lasts exactly SYMBOL_EDGE_TIME cycles. data_in_ready is high while
// idle and also in the last cycle of a stop bit, so a waiting character is
// taken with no gap and back-to-back frames run at the full baud rate.
//
// The frame, the shift-register structure and the symbol time follow the lab
// text; the zero-gap hand-over and the reset values are this design's choice.
module uart_transmitter
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

  output logic       serial_out
);

  localparam int unsigned SYMBOL_EDGE_TIME = symbol_edge_time(CLOCK_FREQ, BAUD_RATE);
  localparam int unsigned CNT_W  = (SYMBOL_EDGE_TIME > 1) ? $clog2(SYMBOL_EDGE_TIME) : 1;
  localparam int unsigned BIT_W  = $clog2(FRAME_BITS);

  initial begin
    assert (SYMBOL_EDGE_TIME >= 2)
      else $fatal(1, "CLOCK_FREQ / BAUD_RATE must be at least 2");
  end

  logic [FRAME_BITS-1:0] shift_q;
  logic [CNT_W-1:0]      clk_cnt_q;
  logic [BIT_W-1:0]      bit_cnt_q;
  logic                  busy_q;

  logic symbol_end, last_symbol, load;

  assign symbol_end    = busy_q && (clk_cnt_q == CNT_W'(SYMBOL_EDGE_TIME - 1));
  assign last_symbol   = symbol_end && (bit_cnt_q == BIT_W'(FRAME_BITS - 1));
  assign data_in_ready = !busy_q || last_symbol;
  assign load          = data_in_valid && data_in_ready;

  always_ff @(posedge clk) begin
    if (reset) begin
      shift_q   <= '1;
      clk_cnt_q <= '0;
      bit_cnt_q <= '0;
      busy_q    <= 1'b0;
    end else if (load) begin
      shift_q   <= make_frame(data_in);
      clk_cnt_q <= '0;
      bit_cnt_q <= '0;
      busy_q    <= 1'b1;
    end else if (symbol_end) begin
      shift_q   <= {1'b1, shift_q[FRAME_BITS-1:1]};
      clk_cnt_q <= '0;
      bit_cnt_q <= bit_cnt_q + 1'b1;
      if (last_symbol) busy_q <= 1'b0;
    end else if (busy_q) begin
      clk_cnt_q <= clk_cnt_q + 1'b1;
    end
  end

  assign serial_out = shift_q[0];

endmodule
