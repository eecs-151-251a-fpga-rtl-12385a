// uart_receiver: deserialises a UART line into 8-bit characters.
//
// In idle the receiver watches the line for a low level, the start bit. From
// that cycle on it counts SYMBOL_EDGE_TIME = CLOCK_FREQ / BAUD_RATE cycles per
// symbol and samples the line SAMPLE_TIME = SYMBOL_EDGE_TIME / 2 cycles into
// each of the ten symbols, shifting the sample into an eight-bit shift
// register (the start bit falls out of the bottom). When the
// stop bit has been sampled the eight data bits are copied to data_out and the
// has_byte flag is set; the receiver then returns to idle, ready for the next
// start bit while the stop bit is still on the line.
//
// Interface: data_out / data_out_valid / data_out_ready form a ready/valid
// output. data_out_valid (the has_byte flag) stays high until a cycle where
// data_out_ready is high and then drops until the next character. serial_in
// must already be synchronous to clk (the uart wrapper registers it).
//
// Timing: data_out_valid rises SYMBOL_EDGE_TIME*9 + SAMPLE_TIME + 1 cycles
// after the cycle in which the start bit is first seen low.
//
// Sampling at mid-symbol, the shift register and the has_byte flag follow the
// lab text. Copying the byte to an output register (so data_out holds still
// while the next frame shifts in), ignoring the level of the stop bit and
// overwriting an unread byte when another arrives are this design's choices.
module uart_receiver
  import uart_pkg::*;
#(
  parameter int unsigned CLOCK_FREQ = DEFAULT_CLOCK_FREQ,
  parameter int unsigned BAUD_RATE  = DEFAULT_BAUD_RATE
) (
  input  logic       clk,
  input  logic       reset,

  input  logic       serial_in,

  output logic [7:0] data_out,
  output logic       data_out_valid,
  input  logic       data_out_ready
);

  localparam int unsigned SYMBOL_EDGE_TIME = symbol_edge_time(CLOCK_FREQ, BAUD_RATE);
  localparam int unsigned SAMPLE_TIME      = SYMBOL_EDGE_TIME / 2;
  localparam int unsigned CNT_W  = (SYMBOL_EDGE_TIME > 1) ? $clog2(SYMBOL_EDGE_TIME) : 1;
  localparam int unsigned BIT_W  = $clog2(FRAME_BITS);

  initial begin
    assert (SYMBOL_EDGE_TIME >= 2)
      else $fatal(1, "CLOCK_FREQ / BAUD_RATE must be at least 2");
  end

  logic [DATA_BITS-1:0]  shift_q;
  logic [CNT_W-1:0]      clk_cnt_q;
  logic [BIT_W-1:0]      bit_cnt_q;
  logic                  running_q;
  logic                  has_byte_q;
  logic [7:0]            data_q;

  logic symbol_end, sample, last_sample, start;

  assign start       = !running_q && !serial_in;
  assign symbol_end  = running_q && (clk_cnt_q == CNT_W'(SYMBOL_EDGE_TIME - 1));
  assign sample      = running_q && (clk_cnt_q == CNT_W'(SAMPLE_TIME));
  assign last_sample = sample && (bit_cnt_q == BIT_W'(FRAME_BITS - 1));

  always_ff @(posedge clk) begin
    if (reset) begin
      shift_q   <= '0;
      clk_cnt_q <= '0;
      bit_cnt_q <= '0;
      running_q <= 1'b0;
    end else if (start) begin
      clk_cnt_q <= CNT_W'(1);
      bit_cnt_q <= '0;
      running_q <= 1'b1;
    end else if (running_q) begin
      if (sample) shift_q <= {serial_in, shift_q[DATA_BITS-1:1]};
      if (last_sample) begin
        running_q <= 1'b0;
      end else if (symbol_end) begin
        clk_cnt_q <= '0;
        bit_cnt_q <= bit_cnt_q + 1'b1;
      end else begin
        clk_cnt_q <= clk_cnt_q + 1'b1;
      end
    end
  end

  // has_byte: set when the last symbol is shifted in, cleared by ready.
  always_ff @(posedge clk) begin
    if (reset) begin
      has_byte_q <= 1'b0;
      data_q     <= '0;
    end else if (last_sample) begin
      has_byte_q <= 1'b1;
      // The stop bit is being sampled now; the start bit has already been
      // shifted out of the bottom, leaving exactly the eight data bits.
      data_q     <= shift_q;
    end else if (data_out_ready) begin
      has_byte_q <= 1'b0;
    end
  end

  assign data_out       = data_q;
  assign data_out_valid = has_byte_q;

  // Ready/valid rule: once offered, a byte stays offered until taken.
  a_valid_held : assert property (@(posedge clk) disable iff (reset)
    data_out_valid && !data_out_ready |=> data_out_valid);

endmodule
