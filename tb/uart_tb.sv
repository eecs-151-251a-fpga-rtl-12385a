// uart_tb: two UARTs with their serial lines crossed, talking both ways.
//
// Instance A sends 40 random characters back to back (data_in_valid held
// high) to instance B, whose receiver is always ready: every byte must arrive
// in order, the first one exactly 3 + 9*SET + SET/2 cycles after its
// handshake (transmitter start, two pin registers, receiver sampling), and
// each following one exactly 10*SET cycles after the one before, i.e. at the
// full baud rate. At the same time B sends 30 characters with random gaps to
// A, whose receiver takes each byte only after a random delay, so the
// ready/valid hand-off on the receive side is exercised under back-pressure.
// SET = 16 cycles per symbol here.
module uart_tb;
  import uart_pkg::*;

  localparam int unsigned CF  = 1_600_000;
  localparam int unsigned BR  = 100_000;
  localparam int          SET = CF / BR;
  localparam int          NAB = 40;
  localparam int          NBA = 30;

  logic clk = 1'b0;
  logic reset = 1'b1;
  always #5 clk = ~clk;

  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  int waits_a = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  logic [7:0] a_din = '0, b_din = '0;
  logic       a_dv = 1'b0, b_dv = 1'b0;
  logic       a_dr, b_dr;
  logic [7:0] a_dout, b_dout;
  logic       a_ov, b_ov;
  logic       a_or = 1'b0, b_or = 1'b1;
  logic       a_to_b, b_to_a;

  uart #(.CLOCK_FREQ(CF), .BAUD_RATE(BR)) ua (
    .clk(clk), .reset(reset),
    .data_in(a_din), .data_in_valid(a_dv), .data_in_ready(a_dr),
    .data_out(a_dout), .data_out_valid(a_ov), .data_out_ready(a_or),
    .serial_in(b_to_a), .serial_out(a_to_b)
  );

  uart #(.CLOCK_FREQ(CF), .BAUD_RATE(BR)) ub (
    .clk(clk), .reset(reset),
    .data_in(b_din), .data_in_valid(b_dv), .data_in_ready(b_dr),
    .data_out(b_dout), .data_out_valid(b_ov), .data_out_ready(b_or),
    .serial_in(a_to_b), .serial_out(b_to_a)
  );

  logic [7:0] ab_q[$], ba_q[$];
  int unsigned first_hs = 0;
  int got_ab = 0, got_ba = 0;
  bit done_ab = 0, done_ba = 0;

  // A -> B, back to back.
  initial begin : send_ab
    repeat (4) @(negedge clk);
    reset = 1'b0;
    repeat (3) @(negedge clk);
    for (int i = 0; i < NAB; i++) begin
      a_din = 8'($urandom);
      a_dv  = 1'b1;
      #1;
      while (!a_dr) begin
        @(negedge clk);
        #1;
      end
      if (i == 0) first_hs = cyc + 1;
      ab_q.push_back(a_din);
      @(negedge clk);
    end
    a_dv = 1'b0;
  end

  // B receives; always ready.
  initial begin : recv_b
    static int unsigned last = 0;
    forever begin
      @(negedge clk);
      #1;
      if (!reset && b_ov) begin
        logic [7:0] e;
        e = ab_q.pop_front();
        check(b_dout == e, $sformatf("A->B byte %0d: %02h expected %02h", got_ab, b_dout, e));
        if (got_ab == 0)
          check(cyc == first_hs + 3 + 9 * SET + SET / 2,
                $sformatf("A->B first-byte latency %0d", cyc - first_hs));
        else
          check(cyc - last == 10 * SET, $sformatf("A->B byte spacing %0d", cyc - last));
        last = cyc;
        got_ab++;
        if (got_ab == NAB) done_ab = 1;
      end
    end
  end

  // B -> A, random gaps.
  initial begin : send_ba
    wait (!reset);
    for (int i = 0; i < NBA; i++) begin
      repeat ($urandom % (8 * SET)) @(negedge clk);
      b_din = 8'($urandom);
      b_dv  = 1'b1;
      #1;
      while (!b_dr) begin
        @(negedge clk);
        #1;
      end
      ba_q.push_back(b_din);
      @(negedge clk);
      b_dv = 1'b0;
    end
  end

  // A receives with a random delay before ready.
  initial begin : recv_a
    wait (!reset);
    forever begin
      @(negedge clk);
      if (a_ov) begin
        logic [7:0] d;
        logic [7:0] e;
        d = a_dout;
        repeat (1 + $urandom % (2 * SET)) begin
          @(negedge clk);
          check(a_ov && a_dout == d, "A holds its byte until taken");
          waits_a++;
        end
        e = ba_q.pop_front();
        check(d == e, $sformatf("B->A byte %0d: %02h expected %02h", got_ba, d, e));
        a_or = 1'b1;
        @(negedge clk);
        a_or = 1'b0;
        #1;
        check(!a_ov, "A drops valid after the handshake");
        got_ba++;
        if (got_ba == NBA) done_ba = 1;
      end
    end
  end

  initial begin : finish
    wait (done_ab && done_ba);
    repeat (20 * SET) @(negedge clk);
    check(!a_ov && !b_ov && ab_q.size() == 0 && ba_q.size() == 0, "nothing left over");
    check(a_to_b && b_to_a, "both lines idle high");
    $display("A->B %0d bytes, B->A %0d bytes, %0d wait cycles", got_ab, got_ba, waits_a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (60_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
