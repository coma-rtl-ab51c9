// tb_coma_rates: data-rate sweep of the example application. Four copies of
// the subsystem (tick every 20000 input cycles) receive data words and send
// results every 2, 4, 8 and 16 ticks. The test checks that every data word is
// processed by the FFT task, that the output task keeps its rate, that the
// ATIM walks ticks while the processor sleeps, and that the estimated dynamic
// energy reduction is large and grows as the data rate falls.
module tb_coma_rates;
  localparam int N = 4;
  localparam int RUN_TICKS = 64;
  localparam int INTERVAL [N] = '{2, 4, 8, 16};

  logic clk_in = 1'b0, rst = 1'b0;
  always #10 clk_in = ~clk_in;   // 50 MHz

  int  checks = 0, failures = 0;
  bit  done [N];
  real red [N], s10 [N];
  int  n_in [N], n_fft [N], n_out [N], n_walk [N], n_sleep [N], n_slow [N], l_checks [N], l_failures [N];

  for (genvar g = 0; g < N; g++) begin : lane
    coma_rate_lane #(.TICK_PERIOD(20000), .INTERVAL(INTERVAL[g]), .RUN_TICKS(RUN_TICKS)) u (
      .clk_in(clk_in), .rst(rst), .done(done[g]), .reduction(red[g]),
      .n_in(n_in[g]), .n_fft(n_fft[g]), .n_out(n_out[g]), .n_walk(n_walk[g]),
      .n_sleep(n_sleep[g]), .n_slow_task(n_slow[g]), .share_s10(s10[g]), .checks(l_checks[g]), .failures(l_failures[g])
    );
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #60ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst = 1'b1;
    #100 rst = 1'b0;
    for (int i = 0; i < N; i++) wait (done[i]);
    #1us;
    for (int i = 0; i < N; i++) begin
      check(n_in[i] == RUN_TICKS / INTERVAL[i], $sformatf("lane %0d inputs %0d", i, n_in[i]));
      check(n_fft[i] == n_in[i], $sformatf("lane %0d: %0d FFT runs for %0d inputs", i, n_fft[i], n_in[i]));
      check(n_out[i] >= RUN_TICKS / (INTERVAL[i] + 1) - 1 && n_out[i] <= RUN_TICKS / INTERVAL[i],
            $sformatf("lane %0d: %0d output runs", i, n_out[i]));
      check(n_walk[i] > 0 && n_sleep[i] > 0, $sformatf("lane %0d never slept", i));
      check(red[i] > 0.5, $sformatf("lane %0d reduction %f", i, red[i]));
      if (i > 0) check(red[i] > red[i-1], $sformatf("lane %0d reduction not above lane %0d", i, i - 1));
      checks += l_checks[i];
      failures += l_failures[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
