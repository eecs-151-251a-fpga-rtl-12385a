// uart_transmitter_tb: self-checking test of the UART transmitter.
//
// A small instance (16 cycles per symbol) is fed random characters with
// random gaps, including characters held ready so that frames follow each
// other back to back. A monitor, independent of the design, watches the line
// on every falling clock edge: each frame must start exactly one cycle after
// its handshake, hold every symbol (start 0, data LSB first, stop 1) for
// exactly 16 cycles, and data_in_ready must be low throughout a frame except
// in its last cycle. A second instance at the default 125 MHz / 115200 baud
// sends 0x55, whose symbols alternate, and the spacing of its edges is
// checked against 125e6 / 115200 = 1085 cycles.
module uart_transmitter_tb;
  import uart_pkg::*;

  localparam int unsigned CF  = 1_600_000;
  localparam int unsigned BR  = 100_000;
  localparam int unsigned SET = CF / BR;              // 16
  localparam int unsigned NCHARS = 60;
  localparam int unsigned FULL_SET = 125_000_000 / 115_200;  // 1085

  logic clk = 1'b0;
  logic reset = 1'b1;
  always #5 clk = ~clk;

  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  int back_to_back = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // ---------------- small instance ----------------
  logic [7:0] din = '0;
  logic       din_valid = 1'b0;
  logic       din_ready, sout;

  uart_transmitter #(.CLOCK_FREQ(CF), .BAUD_RATE(BR)) dut (
    .clk(clk), .reset(reset),
    .data_in(din), .data_in_valid(din_valid), .data_in_ready(din_ready),
    .serial_out(sout)
  );

  typedef struct { logic [7:0] ch; int unsigned hs_cyc; } sent_t;
  sent_t sent_q[$];
  int frames_seen = 0;
  bit in_frame = 1'b0;

  // Driver: set inputs on falling edges; a handshake seen here happens at
  // the next rising edge, i.e. in cycle cyc+1.
  initial begin : driver
    logic [7:0] chars [NCHARS];
    for (int i = 0; i < NCHARS; i++) chars[i] = 8'($urandom);
    chars[0] = 8'h00; chars[1] = 8'hFF; chars[2] = 8'h55; chars[3] = 8'hAA;
    repeat (4) @(negedge clk);
    reset = 1'b0;
    repeat (3) @(negedge clk);
    check(sout == 1'b1 && din_ready == 1'b1, "idle line high and ready after reset");
    for (int i = 0; i < NCHARS; i++) begin
      int gap;
      gap = ($urandom % 2 == 0) ? int'(10 * SET + $urandom % (10 * SET)) : 0;
      repeat (gap) @(negedge clk);
      din = chars[i];
      din_valid = 1'b1;
      while (!din_ready) @(negedge clk);
      if (in_frame) back_to_back++;
      sent_q.push_back('{ch: chars[i], hs_cyc: cyc + 1});
      @(negedge clk);
      din_valid = 1'b0;
      din = 8'($urandom);
    end
  end

  // Monitor: rebuilds frames from the line, independent of the design.
  initial begin : monitor
    static logic prev = 1'b1;
    forever begin
      @(negedge clk);
      if (!reset && prev && !sout) begin
        sent_t s;
        logic [9:0] frame;
        in_frame = 1'b1;
        if (sent_q.size() == 0) begin
          check(1'b0, "frame started with no character sent");
          s = '{ch: 8'h00, hs_cyc: cyc};
        end else s = sent_q.pop_front();
        check(cyc == s.hs_cyc, $sformatf("start bit one cycle after handshake (hs %0d start %0d)", s.hs_cyc, cyc));
        frame = {1'b1, s.ch, 1'b0};
        for (int k = 0; k < 10 * int'(SET); k++) begin
          if (k % SET == 0)
            check(sout == frame[k / SET], $sformatf("char %02h symbol %0d", s.ch, k / SET));
          else if (sout != frame[k / SET]) check(1'b0, $sformatf("char %02h symbol %0d changed early", s.ch, k / SET));
          if (k == 10 * int'(SET) - 1) in_frame = 1'b0;
          if (k < 10 * int'(SET) - 1 && din_ready) check(1'b0, "ready high in mid-frame");
          if (k == 10 * int'(SET) - 1) check(din_ready, "ready high in last stop-bit cycle");
          prev = sout;
          if (k != 10 * int'(SET) - 1) @(negedge clk);
        end
        frames_seen++;
      end else begin
        if (!reset && sout && !din_ready) check(1'b0, "ready low while line idle");
        prev = sout;
      end
    end
  end

  // ---------------- default-size instance ----------------
  logic [7:0] fdin = 8'h55;
  logic       fvalid = 1'b0;
  logic       fready, fsout;

  uart_transmitter full (
    .clk(clk), .reset(reset),
    .data_in(fdin), .data_in_valid(fvalid), .data_in_ready(fready),
    .serial_out(fsout)
  );

  initial begin : full_size
    int unsigned last_edge;
    static int edges = 0;
    logic p;
    wait (!reset);
    @(negedge clk);
    fvalid = 1'b1;
    @(negedge clk);
    fvalid = 1'b0;
    last_edge = cyc;        // the line fell at the rising edge just passed
    check(fsout == 1'b0, "full-size start bit");
    p = fsout;
    while (edges < 9) begin
      @(negedge clk);
      if (fsout != p) begin
        check(cyc - last_edge == FULL_SET, $sformatf("full-size symbol time %0d", cyc - last_edge));
        last_edge = cyc;
        edges++;
        p = fsout;
      end
      if (cyc - last_edge > 2 * FULL_SET) begin
        check(1'b0, "full-size line stuck");
        break;
      end
    end
    // The final symbol is the stop bit; after it the line stays high.
    repeat (FULL_SET + 50) @(negedge clk);
    check(fsout == 1'b1 && fready == 1'b1, "full-size idle after stop bit");
    check(cyc - last_edge == FULL_SET + 50, "full-size no further edges");
  end

  initial begin : finish
    wait (frames_seen == NCHARS);
    repeat (20 * FULL_SET) @(negedge clk);
    check(back_to_back >= 3, $sformatf("back-to-back frames exercised (%0d)", back_to_back));
    $display("back-to-back frames: %0d", back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
