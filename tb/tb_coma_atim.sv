// tb_coma_atim: checks the ATIM unit as a whole (tick timer, task manager and
// interrupt manager) with a one-cycle RAM model on port B and a simple model
// of the wake-up unit (sleep_req clears awake; tick_wake and irq_wake set it).
//  * Awake: a tick becomes tick_irq for the processor and no walk happens;
//    while tick_irq waits the unit must not request sleep; after the
//    acknowledge, with only the idle task ready, it must request sleep.
//  * Asleep: each tick walks the list; a task with OSTCBDly = 2 and priority
//    0x8A must wake the device in state 10 on the second tick, and the tick
//    counter must count both ticks.
//  * An external interrupt raised during a walk must wait for the walk to
//    end before requesting the wake-up.
module tb_coma_atim;
  import coma_pkg::*;
  localparam int AW = 8, TP = 200;
  logic          clk = 1'b0, rst = 1'b0;
  logic          awake = 1'b1;
  dom_en_t       dom_en;
  logic          sleep_req, tick_wake, irq_wake;
  act_state_t    tick_state, irq_state;
  logic          b_en, b_we;
  logic [AW-1:0] b_addr;
  logic [31:0]   b_wdata, b_rdata;
  logic          tick_irq, tick_ack = 1'b0, cpu_irq, tick;
  logic [1:0]    ext_irq = '0;
  logic          opb_select = 1'b0, opb_rnw = 1'b0, sl_xferack;
  logic [31:0]   opb_abus = '0, opb_dbus = '0, sl_dbus;
  logic          cpu_clk, opb_clk;
  logic [31:0]   mem [2**AW];
  int checks = 0, failures = 0;
  int n_walk_wake = 0, n_irq_wake_in_walk = 0;

  coma_atim #(.AW(AW), .TICK_PERIOD(TP), .POLL_PERIOD(16), .N_IRQ(2)) dut (.*);

  always #5 clk = ~clk;
  assign cpu_clk = clk & awake;
  assign opb_clk = cpu_clk;
  assign dom_en  = awake ? state_domains(ACT_ALL) : '0;

  always @(posedge clk) begin
    if (b_en) begin
      b_rdata <= mem[b_addr];
      if (b_we) mem[b_addr] <= b_wdata;
    end
    if (tick_wake || irq_wake) awake <= 1'b1;
    else if (sleep_req) awake <= 1'b0;
    if (tick_wake) n_walk_wake++;
    if (irq_wake && dut.busy) n_irq_wake_in_walk++;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", msg, $time); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c;
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
    // one user task (0x8A, delay 0 for now) and the idle task; user task ready
    mem[ADDR_TCBLIST] = 64;
    mem[64 + TCB_NEXT] = 68; mem[64 + TCB_DLY] = 0; mem[64 + TCB_PRIO] = 32'h8A;
    mem[68 + TCB_NEXT] = 0;  mem[68 + TCB_DLY] = 0; mem[68 + TCB_PRIO] = 32'h3F;
    mem[ADDR_RDYGRP] = 32'h82; mem[ADDR_RDYTBL + 1] = 32'h04; mem[ADDR_RDYTBL + 7] = 32'h80;
    #1 rst = 1'b1;
    #12 rst = 1'b0;
    // awake: tick goes to the processor
    wait (tick);
    @(posedge clk); #1;
    check(tick_irq, "tick not delivered to awake processor");
    check(!dut.busy, "walk while awake");
    // task finishes and delays itself by two ticks; only idle is ready now
    mem[ADDR_RDYGRP] = 32'h80; mem[ADDR_RDYTBL + 1] = 32'h00; mem[64 + TCB_DLY] = 2;
    repeat (40) @(posedge clk);
    #1 check(awake, "slept with a tick interrupt waiting");
    @(posedge cpu_clk); #1 tick_ack = 1'b1;
    @(posedge cpu_clk); #1 tick_ack = 1'b0;
    c = 0;
    while (awake && c < 40) begin @(posedge clk); #1 c++; end
    check(!awake, "no sleep request with only the idle task ready");
    // two ticks while asleep
    wait (tick); @(posedge clk); #1;
    check(dut.busy, "tick while asleep did not start a walk");
    check(!tick_irq, "tick interrupt while asleep");
    wait (!dut.busy); repeat (3) @(posedge clk); #1;
    check(!awake && mem[64 + TCB_DLY] == 1, "first tick: delay 2 -> 1, still asleep");
    wait (tick); @(posedge clk); #1;
    // external interrupt during the walk
    ext_irq[0] = 1'b1;
    wait (awake);
    #1 check(tick_state == ACT_UART, "wake state from priority alias bits");
    check(mem[ADDR_RDYGRP] == 32'h82 && mem[ADDR_RDYTBL + 1] == 32'h04, "task made ready");
    check(mem[ADDR_OSTIME] == 2, "tick counter");
    check(n_walk_wake == 1, "wake by walk");
    check(n_irq_wake_in_walk == 0, "interrupt wake during walk");
    repeat (10) @(posedge clk);
    #1 check(cpu_irq, "external interrupt not notified");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
