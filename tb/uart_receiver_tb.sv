// uart_receiver_tb: self-checking test of the UART receiver.
//
// A small instance (16 cycles per symbol, sampling 8 cycles in) receives
// random characters from a line model written in this testbench. Three phases
// are run: frames with idle gaps and data_out_ready held high; frames whose
// byte is left waiting a random time before ready is raised (valid and data
// must hold still until then, and valid must drop right after); and frames
// sent back to back, with every symbol edge moved at random by up to three
// cycles, which mid-symbol sampling must tolerate. Every byte is checked, and
// data_out_valid must rise exactly 9*16 + 8 + 1 cycles after the line first
// drops. A default-size instance (125 MHz, 115200 baud, 1085 cycles per
// symbol) receives one character with the same latency rule.
module uart_receiver_tb;
  import uart_pkg::*;

  localparam int unsigned CF  = 1_600_000;
  localparam int unsigned BR  = 100_000;
  localparam int          SET = CF / BR;      // 16
  localparam int          JIT = 3;
  localparam int          FULL_SET = 125_000_000 / 115_200;  // 1085

  logic clk = 1'b0;
  logic reset = 1'b1;
  always #5 clk = ~clk;

  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  int held_cycles = 0, jittered_frames = 0, b2b_frames = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  logic       sin = 1'b1;
  logic       ready = 1'b1;
  logic [7:0] dout;
  logic       dvalid;

  uart_receiver #(.CLOCK_FREQ(CF), .BAUD_RATE(BR)) dut (
    .clk(clk), .reset(reset), .serial_in(sin),
    .data_out(dout), .data_out_valid(dvalid), .data_out_ready(ready)
  );

  typedef struct { logic [7:0] ch; int unsigned due; } exp_t;
  exp_t exp_q[$];
  int received = 0;

  // Line model: drives one frame on falling edges. Symbol i ends at
  // (i+1)*per + a random offset in [-jit, jit] (the last edge is exact).
  task automatic send_frame(input logic [7:0] ch, input int per, input int jit,
                            ref logic line);
    logic [9:0] frame;
    int t, edge_t;
    frame = {1'b1, ch, 1'b0};
    @(negedge clk);
    exp_q.push_back('{ch: ch, due: cyc + 1 + 9 * per + per / 2});
    t = 0;
    for (int i = 0; i < 10; i++) begin
      line = frame[i];
      edge_t = (i + 1) * per;
      if (i < 9 && jit > 0) edge_t += int'($urandom % (2 * jit + 1)) - jit;
      while (t < edge_t - 1) begin
        @(negedge clk);
        t++;
      end
      t++;
      if (i < 9) @(negedge clk);
    end
    // Leaves the stop bit on the line; the caller's next edge ends it.
  endtask

  // Monitor on falling edges.
  initial begin : monitor
    static logic pv = 1'b0, pr = 1'b0;
    static logic [7:0] pd = '0;
    forever begin
      @(negedge clk);
      #1;  // let this edge's stimulus settle
      if (!reset) begin
        if (pv && !pr) begin
          check(dvalid, "valid held until ready");
          check(dout == pd, "data held while waiting");
          held_cycles++;
        end else if (dvalid && !(pv && !pr)) begin
          if (pv) check(1'b0, "valid not dropped after handshake");
          if (exp_q.size() == 0) check(1'b0, "unexpected byte");
          else begin
            exp_t e;
            e = exp_q.pop_front();
            check(dout == e.ch, $sformatf("byte %02h received as %02h", e.ch, dout));
            check(cyc == e.due, $sformatf("valid at cycle %0d, expected %0d", cyc, e.due));
          end
          received++;
        end
      end
      pv = dvalid; pr = ready; pd = dout;
    end
  end

  int sent = 0;
  initial begin : stimulus
    repeat (4) @(negedge clk);
    reset = 1'b0;
    repeat (5) @(negedge clk);
    check(!dvalid, "no byte after reset");
    // Phase 1: gaps, ready always high.
    for (int i = 0; i < 20; i++) begin
      logic [7:0] c;
      c = (i == 0) ? 8'h00 : (i == 1) ? 8'hFF : 8'($urandom);
      send_frame(c, SET, 0, sin); sent++;
      repeat (1 + $urandom % (3 * SET)) @(negedge clk);
    end
    // Phase 2: byte waits for ready.
    ready = 1'b0;
    for (int i = 0; i < 15; i++) begin
      send_frame(8'($urandom), SET, 0, sin); sent++;
      wait (dvalid);
      repeat (1 + $urandom % (3 * SET)) @(negedge clk);
      ready = 1'b1;
      @(negedge clk);
      ready = 1'b0;
      repeat (2) @(negedge clk);
    end
    ready = 1'b1;
    // Phase 3: back to back, jittered edges.
    for (int i = 0; i < 25; i++) begin
      send_frame(8'($urandom), SET, JIT, sin); sent++;
      jittered_frames++;
      b2b_frames++;
    end
    @(negedge clk);
    sin = 1'b1;
    repeat (4 * SET) @(negedge clk);
    check(received == sent, $sformatf("received %0d of %0d", received, sent));
    check(held_cycles > 15, "back-pressure exercised");
    check(exp_q.size() == 0, "no byte missing");
    full_go = 1'b1;
  end

  // Default-size instance.
  logic       full_go = 1'b0;
  logic       fsin = 1'b1;
  logic [7:0] fdout;
  logic       fvalid;

  uart_receiver full (
    .clk(clk), .reset(reset), .serial_in(fsin),
    .data_out(fdout), .data_out_valid(fvalid), .data_out_ready(1'b1)
  );

  initial begin : full_size
    int unsigned due;
    wait (full_go);
    @(negedge clk);
    due = cyc + 1 + 9 * FULL_SET + FULL_SET / 2;
    fork
      send_frame(8'hA7, FULL_SET, 0, fsin);
      begin
        while (!fvalid && cyc < due + 100) @(negedge clk);
      end
    join_any
    while (!fvalid && cyc < due + 100) @(negedge clk);
    check(fvalid && fdout == 8'hA7, $sformatf("full-size byte %02h", fdout));
    check(cyc == due + 1, $sformatf("full-size valid at %0d expected %0d", cyc, due + 1));
    disable fork;
    @(negedge clk);
    fsin = 1'b1;
    $display("held cycles %0d, jittered frames %0d, back-to-back %0d", held_cycles, jittered_frames, b2b_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
