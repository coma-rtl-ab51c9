// tb_coma_tick_timer: checks the OS tick timer with PERIOD = 12. Ticks must
// come exactly every 12 cycles. While the processor sleeps each tick must
// appear on tick_atim and not raise tick_irq; while it is awake tick_irq must
// rise with the tick and fall within four cycles of the processor's
// acknowledge, which is issued on a processor clock of a different period.
module tb_coma_tick_timer;
  localparam int P = 12;
  logic clk = 1'b0, cpu_clk = 1'b0, rst = 1'b0;
  logic cpu_awake = 1'b0, cpu_ack = 1'b0;
  logic tick, tick_atim, tick_irq;
  int checks = 0, failures = 0;
  int cyc = 0, last_tick = -1, n_atim = 0, n_tick = 0;

  coma_tick_timer #(.PERIOD(P)) dut (.*);

  always #5 clk = ~clk;
  always #7 cpu_clk = ~cpu_clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", msg, $time); end
  endtask

  always @(posedge clk) if (!rst) begin
    cyc++;
    if (tick) begin
      n_tick++;
      if (last_tick >= 0) check(cyc - last_tick == P, $sformatf("tick spacing %0d", cyc - last_tick));
      last_tick = cyc;
      check(tick_atim == !cpu_awake, "tick_atim does not follow cpu_awake");
    end else begin
      check(!tick_atim, "tick_atim without tick");
    end
    if (tick_atim) n_atim++;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst = 1'b1;
    #20 rst = 1'b0;
    // asleep: ticks go to the ATIM
    repeat (5 * P) @(posedge clk);
    check(!tick_irq, "tick_irq while asleep");
    check(n_atim >= 4, "no ATIM ticks");
    // awake: interrupt and acknowledge
    @(posedge clk); #1 cpu_awake = 1'b1;
    repeat (4) begin
      wait (tick_irq);
      repeat (3) @(posedge cpu_clk);
      cpu_ack <= 1'b1;
      @(posedge cpu_clk);
      cpu_ack <= 1'b0;
      repeat (4) @(posedge clk);
      #1 check(!tick_irq, "tick_irq not cleared by acknowledge");
    end
    check(n_tick >= 8, "too few ticks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
