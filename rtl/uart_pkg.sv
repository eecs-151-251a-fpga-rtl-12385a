// uart_pkg: constants and helper functions shared by the UART and the echo
// logic.
//
// The frame is the classic 8N1 UART frame: one start bit (0), eight data bits
// sent least significant bit first, one stop bit (1), ten symbols in all. The
// width of one symbol in system clock cycles is ClockFreq / BaudRate, and the
// receiver samples each symbol half a symbol after its leading edge. The baud
// rate of 115200 and the frame layout come from the lab text; the 125 MHz
// system clock is this design's choice (the usual Pynq-Z1 fabric clock).
package uart_pkg;

  localparam int unsigned DEFAULT_CLOCK_FREQ = 125_000_000;
  localparam int unsigned DEFAULT_BAUD_RATE  = 115_200;

  localparam int unsigned DATA_BITS  = 8;
  localparam int unsigned FRAME_BITS = DATA_BITS + 2;  // start + data + stop

  // Clock cycles per symbol (integer division, as the hardware counts whole
  // cycles).
  function automatic int unsigned symbol_edge_time(int unsigned clock_freq,
                                                   int unsigned baud_rate);
    return clock_freq / baud_rate;
  endfunction

  // Build the ten-symbol frame, symbol 0 (start bit) in bit 0.
  function automatic logic [FRAME_BITS-1:0] make_frame(logic [DATA_BITS-1:0] ch);
    return {1'b1, ch, 1'b0};
  endfunction

  // Swap the case of an ASCII letter; any other code is returned unchanged.
  function automatic logic [7:0] invert_case(logic [7:0] ch);
    if ((ch >= 8'h41 && ch <= 8'h5A) || (ch >= 8'h61 && ch <= 8'h7A))
      return ch ^ 8'h20;
    return ch;
  endfunction

endpackage
