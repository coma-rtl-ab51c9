// tb_coma_freq: processor frequency sweep of the data-output task. Four copies
// of the subsystem (tick every 20000 input cycles, data every 4 ticks) run
// with CLKDV = input / 2, 4, 8 and 16 (25, 12.5, 6.25 and 3.125 MHz from a
// 50 MHz input), so state 10 runs the processor, OPB and UART at that clock.
// The data-output task sends its bytes at a fixed interval set by the serial
// port and spins in between, so a slower clock keeps the task time but halves
// the processor cycles per step. The processor model checks the period of every
// state-10 clock it sees; the test checks that the application keeps working
// at each frequency, that the time in state 10 stays the same and that the
// processor cycles spent in data output fall in proportion to the divider.
module tb_coma_freq;
  localparam int N = 4;
  localparam int RUN_TICKS = 64;
  localparam int DIVIDE [N] = '{2, 4, 8, 16};

  logic clk_in = 1'b0, rst = 1'b0;
  always #10 clk_in = ~clk_in;   // 50 MHz

  int  checks = 0, failures = 0;
  bit  done [N];
  real red [N], s10 [N];
  longint cyc [N];
  int  n_in [N], n_fft [N], n_out [N], n_walk [N], n_sleep [N], n_slow [N], l_checks [N], l_failures [N];

  for (genvar g = 0; g < N; g++) begin : lane
    coma_rate_lane #(.TICK_PERIOD(20000), .INTERVAL(4), .RUN_TICKS(RUN_TICKS), .CLKDV_DIVIDE(DIVIDE[g])) u (
      .clk_in(clk_in), .rst(rst), .done(done[g]), .reduction(red[g]),
      .n_in(n_in[g]), .n_fft(n_fft[g]), .n_out(n_out[g]), .n_walk(n_walk[g]),
      .n_sleep(n_sleep[g]), .n_slow_task(n_slow[g]), .share_s10(s10[g]), .out_cycles(cyc[g]), .checks(l_checks[g]), .failures(l_failures[g])
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
      check(n_fft[i] == n_in[i] && n_in[i] == RUN_TICKS / 4, $sformatf("lane %0d: %0d FFT runs for %0d inputs", i, n_fft[i], n_in[i]));
      check(n_slow[i] == n_out[i] && n_out[i] >= RUN_TICKS / 5 - 1,
            $sformatf("lane %0d: %0d of %0d output runs on CLKDV", i, n_slow[i], n_out[i]));
      if (i > 0) begin
        real ratio;
        real cr;
        ratio = s10[i] / s10[i-1];
        cr = real'(cyc[i-1]) / real'(cyc[i]);
        $display("divider %0d -> %0d: state 10 time x%0.2f, processor cycles in data output /%0.2f",
                 DIVIDE[i-1], DIVIDE[i], ratio, cr);
        check(ratio > 0.9 && ratio < 1.15, $sformatf("lane %0d state 10 time ratio %f", i, ratio));
        check(cr > 1.9 && cr < 2.1, $sformatf("lane %0d processor cycle ratio %f", i, cr));
      end
      checks += l_checks[i];
      failures += l_failures[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
