// echo_fsm_tb: self-checking test of the echo state machine.
//
// All 256 character codes, then 200 random ones, are offered on the receive
// side with a ready/valid source that holds each code until it is taken. The
// transmit side is a sink whose ready is high at random. Each code must come
// out in order, with upper- and lower-case ASCII letters swapped and every
// other code unchanged (reference: +32 for 'A'..'Z', -32 for 'a'..'z'). The
// source and sink also check the ready/valid rules, and with both sides
// always willing a character must pass every two cycles.
module echo_fsm_tb;

  logic clk = 1'b0;
  logic reset = 1'b1;
  always #5 clk = ~clk;

  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  int n_upper = 0, n_lower = 0, n_other = 0, n_stall = 0;

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

  logic [7:0] rx_data = '0;
  logic       rx_valid = 1'b0;
  logic       rx_ready;
  logic [7:0] tx_data;
  logic       tx_valid;
  logic       tx_ready = 1'b0;

  echo_fsm dut (
    .clk(clk), .reset(reset),
    .rx_data(rx_data), .rx_valid(rx_valid), .rx_ready(rx_ready),
    .tx_data(tx_data), .tx_valid(tx_valid), .tx_ready(tx_ready)
  );

  localparam int N = 456;
  logic [7:0] exp_q[$];
  int got = 0;
  int sink_mode = 0;   // 0: random ready, 1: always ready
  int unsigned t_fast_start = 0, t_fast_end = 0;

  initial begin : source
    repeat (3) @(negedge clk);
    reset = 1'b0;
    for (int i = 0; i < N; i++) begin
      if (i == 400) begin
        sink_mode = 1;
        t_fast_start = cyc;
      end
      rx_data  = (i < 256) ? 8'(i) : 8'($urandom);
      rx_valid = 1'b1;
      #1;
      while (!rx_ready) begin
        @(negedge clk);
        #1;
      end
      exp_q.push_back(ref_echo(rx_data));
      if (rx_data >= "A" && rx_data <= "Z") n_upper++;
      else if (rx_data >= "a" && rx_data <= "z") n_lower++;
      else n_other++;
      @(negedge clk);
      rx_valid = (sink_mode == 1) ? 1'b1 : 1'b0;
      if (sink_mode == 0) repeat ($urandom % 3) @(negedge clk);
    end
    rx_valid = 1'b0;
  end

  initial begin : sink
    static logic       pv = 1'b0, pr = 1'b0;
    static logic [7:0] pd = '0;
    forever begin
      @(negedge clk);
      tx_ready = (sink_mode == 1) ? 1'b1 : ($urandom % 3 == 0);
      #1;
      if (!reset) begin
        if (pv && !pr) begin
          check(tx_valid && tx_data == pd, "tx held until ready");
          n_stall++;
        end
        if (tx_valid && tx_ready) begin
          logic [7:0] e;
          e = exp_q.pop_front();
          check(tx_data == e, $sformatf("char %0d: %02h expected %02h", got, tx_data, e));
          got++;
          if (got == N) t_fast_end = cyc;
        end
      end
      pv = tx_valid; pr = tx_ready; pd = tx_data;
    end
  end

  initial begin : finish
    wait (got == N);
    repeat (5) @(negedge clk);
    check(exp_q.size() == 0, "all characters echoed");
    check(n_upper >= 26 && n_lower >= 26 && n_other > 0 && n_stall > 0,
          "upper, lower, other and stalled cases all exercised");
    check(t_fast_end - t_fast_start <= 2 * (N - 400) + 2,
          $sformatf("throughput: %0d chars in %0d cycles", N - 400, t_fast_end - t_fast_start));
    $display("upper %0d lower %0d other %0d stall cycles %0d", n_upper, n_lower, n_other, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
