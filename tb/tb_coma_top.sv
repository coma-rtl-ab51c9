// tb_coma_top: end-to-end test of the COMA subsystem at its default
// parameters (50 MHz input clock, CLKDV = input / 16, a tick every 500000
// cycles), with the processor and real-time OS model coma_cpu_model running
// the data-input / FFT / data-output application (FFT task priority 0x05 in
// state 00, data-output task priority 0x8A in state 10, re-delayed by two
// ticks, idle task priority 63) and a GPIO data source as the environment.
// The test counts every mechanism and fails if one never happened: sleep on
// idle, tick walk by the ATIM while asleep, wake-up by tick in state 10 on the
// CLKDV clock, wake-up by interrupt in state 01, an interrupt served with the
// wake-up skipped, a state change over the FSL, a tick served by the
// processor. It also checks that gated clocks are silent, that each state runs
// exactly its domains, that the tick counter in memory equals the ticks, and
// that the device passes through asleep -> 01 -> 00 -> asleep for a data word
// and asleep -> 10 -> asleep for the data-output task.
module tb_coma_top;
  import coma_pkg::*;
  localparam int AW = 11;

  logic          clk_in = 1'b0, rst = 1'b0;
  logic          clk_cpu, clk_mem, clk_opb, clk_gpio, clk_uart, dcm_locked;
  logic          lmb_en, ilmb_en;
  logic [3:0]    lmb_we, ilmb_we;
  logic [AW-1:0] lmb_addr, ilmb_addr;
  logic [31:0]   lmb_wdata, lmb_rdata, ilmb_wdata, ilmb_rdata;
  logic [31:0]   fsl_m_data;
  logic          fsl_m_write, fsl_m_full;
  logic          tick_irq, tick_ack, cpu_irq, tick;
  logic [1:0]    ext_irq = '0;
  logic          opb_select, opb_rnw, sl_xferack;
  logic [31:0]   opb_abus, opb_dbus, sl_dbus;
  logic          awake;
  act_state_t    act_state;
  dom_en_t       dom_en;

  coma_top dut (.*);

  int checks = 0, failures = 0;
  int n_isr, n_fft, n_out, n_cpu_tick, n_fsl, n_slow_task, m_checks, m_failures;
  bit os_started;
  longint out_cycles;
  realtime t_in = 20.0;

  coma_cpu_model #(.AW(AW), .DIV(16), .FFT_CYCLES(2000), .OUT_BYTES(2), .OUT_DELAY(2)) cpu (
    .*, .start(dcm_locked && !rst), .checks(m_checks), .failures(m_failures)
  );

  initial begin
    #1 rst = 1'b1;
    #100 rst = 1'b0;
  end

  always #10 clk_in = ~clk_in;   // 50 MHz

  int n_ticks = 0, n_sleep = 0, n_walk = 0, n_wake_tick = 0, n_wake_irq = 0;
  int n_irq_skip = 0, n_irq_wake_cyc = 0;
  int cpu_edges = 0, uart_edges = 0, gpio_edges = 0, opb_edges = 0;
  logic awake_q = 1'b1, tick_wake_q = 1'b0, irq_wake_q = 1'b0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", msg, $time); end
  endtask

  always @(posedge clk_cpu)  cpu_edges++;
  always @(posedge clk_uart) uart_edges++;
  always @(posedge clk_gpio) gpio_edges++;
  always @(posedge clk_opb)  opb_edges++;

  // mechanism monitors on the input clock
  always @(posedge clk_in) if (!rst) begin
    awake_q     <= awake;
    tick_wake_q <= dut.tick_wake;
    irq_wake_q  <= dut.irq_wake;
    if (tick) n_ticks++;
    if (dut.irq_wake) n_irq_wake_cyc++;
    if (awake_q && !awake) n_sleep++;
    if (!awake_q && awake) begin
      if (tick_wake_q) begin
        n_wake_tick++;
        check(act_state == ACT_UART, "tick wake-up not in the data-output task's state");
      end else if (irq_wake_q) begin
        n_wake_irq++;
        check(act_state == ACT_GPIO, "interrupt wake-up not in state 01");
      end
    end
    if (dut.u_atim.u_task.st == dut.u_atim.u_task.S_LIST) begin
      n_walk++;
      check(!awake, "ATIM walk while the processor is awake");
    end
  end

  // trace of device states: 0..3 = awake in that activation state, 4 = asleep
  int trace [$];
  always @(posedge clk_in) if (!rst) begin
    int code;
    code = awake ? int'(act_state) : 4;
    if (trace.size() == 0 || trace[$] != code) trace.push_back(code);
  end

  function automatic bit trace_has(int seq [$]);
    for (int i = 0; i + seq.size() <= trace.size(); i++) begin
      bit m = 1'b1;
      for (int j = 0; j < seq.size(); j++) if (trace[i + j] != seq[j]) m = 1'b0;
      if (m) return 1'b1;
    end
    return 1'b0;
  endfunction

  // clocks of a sleeping device must be silent (after one main-clock cycle,
  // which is up to 16 input cycles in state 10)
  always @(negedge awake) begin
    int e0;
    repeat (34) @(posedge clk_in);
    e0 = cpu_edges + opb_edges + gpio_edges + uart_edges;
    for (int k = 0; k < 200 && !awake; k++) @(posedge clk_in);
    if (!awake) check(cpu_edges + opb_edges + gpio_edges + uart_edges == e0,
                      "gated clocks run while asleep");
  end

  initial begin
    #400ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- environment: GPIO data input ----------------
  task automatic gpio_pulse();
    ext_irq[0] = 1'b1;
    repeat (50) @(posedge clk_in);
    ext_irq[0] = 1'b0;
  endtask

  initial begin : env
    int isr0, w0;
    wait (os_started);
    @(posedge clk_in);
    // 1. data arrives while everything runs (state 11): wake-up skipped
    check(awake && dom_en.opb, "device not active at start");
    w0 = n_irq_wake_cyc;
    gpio_pulse();
    wait (n_isr == 1);
    if (n_irq_wake_cyc == w0) n_irq_skip++;
    // 2. idle -> sleep; two ticks walked by the ATIM; data-output task wakes
    //    the device in state 10
    wait (n_out == 1);
    wait (!awake);
    // 3. data arrives while asleep: wake-up in state 01
    repeat (1000) @(posedge clk_in);
    gpio_pulse();
    wait (n_fft == 2);
    wait (!awake);
    // 4. data arrives just before a tick, so the processor serves that tick
    @(posedge tick);
    repeat (500000 - 300) @(posedge clk_in);
    isr0 = n_isr;
    gpio_pulse();
    wait (n_isr > isr0 && n_cpu_tick > 0);
    wait (!awake);
    wait (n_out == 2);
    wait (!awake);
    repeat (100) @(posedge clk_in);
    begin
      logic [31:0] t;
      t = dut.u_bram.mem[ADDR_OSTIME];
      check(t == 32'(n_ticks % 256), $sformatf("tick counter %0d, ticks %0d", t, n_ticks));
    end
    $display("ticks=%0d sleeps=%0d atim_walks=%0d wake_tick=%0d wake_irq=%0d irq_skip=%0d fsl=%0d cpu_ticks=%0d slow_tasks=%0d isr=%0d fft=%0d out=%0d",
             n_ticks, n_sleep, n_walk, n_wake_tick, n_wake_irq, n_irq_skip, n_fsl, n_cpu_tick,
             n_slow_task, n_isr, n_fft, n_out);
    check(n_sleep > 0, "never slept");
    check(n_walk > 0, "ATIM never walked the task list");
    check(n_wake_tick > 0, "never woken by a tick");
    check(n_wake_irq > 0, "never woken by an interrupt");
    check(n_irq_skip > 0, "wake-up never skipped");
    check(n_fsl > 0, "no FSL state change");
    check(n_cpu_tick > 0, "processor never served a tick");
    check(n_slow_task > 0, "never ran on CLKDV");
    // data input and FFT: asleep, 01 for the ISR, 00 for the FFT, asleep
    check(trace_has('{4, 1, 0, 4}), "no asleep-01-00-asleep sequence");
    // data output: asleep, 10 for the task, asleep
    check(trace_has('{4, 2, 4}), "no asleep-10-asleep sequence");
    checks += m_checks;
    failures += m_failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
