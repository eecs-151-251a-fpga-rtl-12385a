// z1top_tb: end-to-end test of the echo design at its default size.
//
// The FPGA top runs at its defaults (125 MHz clock, 115200 baud, 1085 cycles
// per symbol). A second uart plays the workstation: it types characters onto
// FPGA_SERIAL_RX and reads the echo from FPGA_SERIAL_TX. Every echo must come
// back in order, with ASCII letters case-swapped and other codes unchanged.
//
// Phase 1 sends 12 characters with idle gaps and 30 back to back; the echoes
// of back-to-back characters must be exactly 10 * 1085 cycles apart.
// Phase 2 types 80 characters back to back from a transmitter running about
// 1.6 % fast (117000 baud, 1068 cycles per symbol, well inside the receiver's
// half-symbol margin). The echo path, limited to 115200 baud, falls behind:
// the echo machine waits for the busy transmitter, then the receiver's byte
// waits for the echo machine, which exercises the ready/valid back-pressure
// inside the FPGA; the echoes then leave back to back at exactly 10 * 1085
// cycles apart. Each of these mechanisms is counted and must occur.
module z1top_tb;
  import uart_pkg::*;

  localparam int SET      = 125_000_000 / 115_200;  // 1085
  localparam int FAST_BR  = 117_000;
  localparam int N1_GAP   = 12;
  localparam int N1_B2B   = 30;
  localparam int N2       = 80;
  localparam int NTOTAL   = N1_GAP + N1_B2B + N2;

  logic clk = 1'b0;
  logic reset = 1'b1;
  always #4 clk = ~clk;   // 125 MHz

  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  int n_upper = 0, n_lower = 0, n_other = 0, n_b2b_in = 0;
  int n_tx_stall = 0, n_rx_wait = 0, n_spacing = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  function automatic logic [7:0] ref_echo(input logic [7:0] c);
    if (c >= "A" && c <= "Z") return c + 8'd32;
    if (c >= "a" && c <= "z") return c - 8'd32;
    return c;
  endfunction

  // ---- FPGA ----
  logic fpga_rx, fpga_tx;
  z1top dut (.clk(clk), .reset(reset), .FPGA_SERIAL_RX(fpga_rx), .FPGA_SERIAL_TX(fpga_tx));

  // ---- workstation ----
  logic [7:0] h_din = '0;
  logic       h_dv = 1'b0, h_dr;
  logic [7:0] h_dout;
  logic       h_ov;
  logic       h_line;

  uart host (
    .clk(clk), .reset(reset),
    .data_in(h_din), .data_in_valid(h_dv), .data_in_ready(h_dr),
    .data_out(h_dout), .data_out_valid(h_ov), .data_out_ready(1'b1),
    .serial_in(fpga_tx), .serial_out(h_line)
  );

  logic [7:0] f_din = '0;
  logic       f_dv = 1'b0, f_dr, f_line;
  uart_transmitter #(.BAUD_RATE(FAST_BR)) fast_typist (
    .clk(clk), .reset(reset),
    .data_in(f_din), .data_in_valid(f_dv), .data_in_ready(f_dr),
    .serial_out(f_line)
  );

  logic phase2 = 1'b0;
  assign fpga_rx = phase2 ? f_line : h_line;

  typedef struct { logic [7:0] ch; bit spaced; } exp_t;
  exp_t exp_q[$];
  int got = 0;

  function automatic string show(input logic [7:0] c);
    return $sformatf("%02h", c);
  endfunction

  function automatic logic [7:0] pick(input int i);
    // Letters of both cases, digits and punctuation, plus random codes.
    case (i % 4)
      0: return 8'("A" + $urandom % 26);
      1: return 8'("a" + $urandom % 26);
      2: return 8'($urandom % 128);
      default: return 8'($urandom);
    endcase
  endfunction

  task automatic note(input logic [7:0] c, input bit spaced);
    exp_q.push_back('{ch: ref_echo(c), spaced: spaced});
    if (c >= "A" && c <= "Z") n_upper++;
    else if (c >= "a" && c <= "z") n_lower++;
    else n_other++;
  endtask

  // Typing.
  initial begin : typist
    repeat (5) @(negedge clk);
    reset = 1'b0;
    repeat (10) @(negedge clk);
    // Phase 1a: with idle gaps.
    for (int i = 0; i < N1_GAP; i++) begin
      h_din = pick(i);
      h_dv = 1'b1;
      #1;
      while (!h_dr) begin @(negedge clk); #1; end
      note(h_din, 1'b0);
      @(negedge clk);
      h_dv = 1'b0;
      repeat (12 * SET + $urandom % (4 * SET)) @(negedge clk);
    end
    // Phase 1b: back to back.
    for (int i = 0; i < N1_B2B; i++) begin
      h_din = pick(i);
      h_dv = 1'b1;
      #1;
      while (!h_dr) begin @(negedge clk); #1; end
      if (i > 0) n_b2b_in++;
      note(h_din, i > 0);
      @(negedge clk);
    end
    h_dv = 1'b0;
    wait (got == N1_GAP + N1_B2B);
    repeat (2 * SET) @(negedge clk);
    // Phase 2: fast typist, back to back.
    phase2 = 1'b1;
    repeat (2 * SET) @(negedge clk);
    for (int i = 0; i < N2; i++) begin
      f_din = pick(i);
      f_dv = 1'b1;
      #1;
      while (!f_dr) begin @(negedge clk); #1; end
      if (i > 0) n_b2b_in++;
      // Once the echo path lags, its frames leave back to back.
      note(f_din, i > 8);
      @(negedge clk);
    end
    f_dv = 1'b0;
  end

  // Reading the echo.
  initial begin : reader
    static int unsigned last = 0;
    forever begin
      @(negedge clk);
      if (!reset && h_ov) begin
        exp_t e;
        if (exp_q.size() == 0) begin
          check(1'b0, $sformatf("unexpected echo %s", show(h_dout)));
        end else begin
          e = exp_q.pop_front();
          check(h_dout == e.ch, $sformatf("echo %0d: %s expected %s", got, show(h_dout), show(e.ch)));
          if (e.spaced) begin
            check(cyc - last == 10 * SET, $sformatf("echo %0d spacing %0d", got, cyc - last));
            n_spacing++;
          end
        end
        last = cyc;
        got++;
      end
    end
  end

  // Mechanism counters inside the FPGA.
  always @(negedge clk) begin
    if (!reset) begin
      if (dut.tx_valid && !dut.tx_ready) n_tx_stall++;
      if (dut.rx_valid && !dut.rx_ready) n_rx_wait++;
    end
  end

  initial begin : finish
    wait (got == NTOTAL);
    repeat (3 * SET) @(negedge clk);
    check(exp_q.size() == 0 && !h_ov, "no echo missing or extra");
    check(fpga_tx == 1'b1, "FPGA_SERIAL_TX idle high at the end");
    check(n_upper > 0, "upper-case letters echoed");
    check(n_lower > 0, "lower-case letters echoed");
    check(n_other > 0, "non-letters echoed");
    check(n_b2b_in > 0, "back-to-back input frames");
    check(n_spacing > 0, "back-to-back echo frames");
    check(n_tx_stall > 0, "echo machine waited for the transmitter");
    check(n_rx_wait > 0, "receiver byte waited for the echo machine");
    $display("upper %0d lower %0d other %0d b2b-in %0d b2b-out %0d tx-stall cycles %0d rx-wait cycles %0d",
             n_upper, n_lower, n_other, n_b2b_in, n_spacing, n_tx_stall, n_rx_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired after %0d echoes", got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
