// tb_coma_task_mgr: checks the ATIM task manager against a reference model of
// the MicroC/OS-II tick processing, using its own one-cycle-latency RAM model
// for port B.
//  * The three-block list of the linked-list figure (delays 2, 1, 0; priorities
//    6, 62, 63) is ticked with the processor asleep: the priority-62 task
//    (aliased to state 10) must become ready on the first tick, the
//    priority-6 task (state 00) on the second, nothing on the third.
//  * Random lists of up to 12 blocks with random delays and aliased priorities
//    are ticked several times; RAM contents, wake_req, wake_state and the walk
//    length (5 + 4 N + 6 R cycles) are compared with the model.
//  * Two ticks in quick succession must give two walks.
//  * With the processor awake the ready list is polled: only-idle gives a
//    sleep request within POLL_PERIOD + 4 cycles; a waiting interrupt or a
//    ready user task gives none.
module tb_coma_task_mgr;
  import coma_pkg::*;
  localparam int AW = 8, POLL = 16;
  logic          clk = 1'b0, rst = 1'b0;
  logic          tick_atim = 1'b0, cpu_awake = 1'b0, cpu_busy = 1'b0;
  logic          b_en, b_we;
  logic [AW-1:0] b_addr;
  logic [31:0]   b_wdata, b_rdata;
  logic          sleep_req, wake_req, busy;
  act_state_t    wake_state;
  logic [31:0]   mem [2**AW];
  logic [31:0]   ref_mem [2**AW];
  int checks = 0, failures = 0;
  int n_sleep = 0, n_wake = 0;

  coma_task_mgr #(.AW(AW), .POLL_PERIOD(POLL), .MAX_TCB(64)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (b_en) begin
    b_rdata <= mem[b_addr];
    if (b_we) mem[b_addr] <= b_wdata;
  end
  always @(posedge clk) begin
    if (sleep_req) n_sleep++;
    if (wake_req) n_wake++;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", msg, $time); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: one OS tick over ref_mem. Returns blocks walked, blocks made
  // ready and the priority byte of the best task made ready.
  task automatic ref_tick(output int nb, output int nr, output logic [7:0] best);
    int p;
    nb = 0; nr = 0; best = '0;
    p = int'(ref_mem[ADDR_TCBLIST][AW-1:0]);
    while (p != 0) begin
      logic [15:0] d;
      nb++;
      d = ref_mem[p + TCB_DLY][15:0];
      if (d != 0) begin
        ref_mem[p + TCB_DLY] = {16'd0, d - 16'd1};
        if (d == 1) begin
          logic [7:0] pr;
          pr = ref_mem[p + TCB_PRIO][7:0];
          ref_mem[ADDR_RDYGRP][pr[5:3]] = 1'b1;
          ref_mem[ADDR_RDYTBL + pr[5:3]][pr[2:0]] = 1'b1;
          if (nr == 0 || pr[5:0] < best[5:0]) best = pr;
          nr++;
        end
      end
      p = int'(ref_mem[p + TCB_NEXT][AW-1:0]);
    end
    ref_mem[ADDR_OSTIME] = {24'd0, ref_mem[ADDR_OSTIME][7:0] + 8'd1};
  endtask

  task automatic do_tick(input string tag);
    int nb, nr, len, w0;
    logic [7:0] best;
    ref_tick(nb, nr, best);
    w0 = n_wake;
    @(posedge clk); #1 tick_atim = 1'b1;
    @(posedge clk); #1 tick_atim = 1'b0;
    len = 0;
    while (busy) begin @(posedge clk); #1 len++; end
    @(posedge clk); #1;
    check(len == 5 + 4 * nb + 6 * nr, $sformatf("%s walk length %0d exp %0d", tag, len, 5 + 4*nb + 6*nr));
    check((n_wake - w0) == (nr > 0 ? 1 : 0), $sformatf("%s wake count", tag));
    if (nr > 0) check(wake_state == act_state_t'(best[7:6]), $sformatf("%s wake state", tag));
    for (int i = 0; i < 2**AW; i++)
      if (mem[i] != ref_mem[i]) begin
        check(1'b0, $sformatf("%s mem[%0d]=%h exp %h", tag, i, mem[i], ref_mem[i]));
        break;
      end
    checks++;
  endtask

  task automatic clear_mem();
    for (int i = 0; i < 2**AW; i++) begin mem[i] = '0; ref_mem[i] = '0; end
  endtask

  task automatic put(input int a, input logic [31:0] v);
    mem[a] = v; ref_mem[a] = v;
  endtask

  initial begin
    #1 rst = 1'b1;
    clear_mem();
    #12 rst = 1'b0;
    // figure list: blocks at 64, 68, 72
    put(ADDR_TCBLIST, 64);
    put(64 + TCB_NEXT, 68); put(64 + TCB_DLY, 2); put(64 + TCB_PRIO, 8'h06);
    put(68 + TCB_NEXT, 72); put(68 + TCB_PREV, 64); put(68 + TCB_DLY, 1); put(68 + TCB_PRIO, 8'hBE);
    put(72 + TCB_NEXT, 0);  put(72 + TCB_PREV, 68); put(72 + TCB_DLY, 0); put(72 + TCB_PRIO, 8'h3F);
    put(ADDR_RDYGRP, 8'h80); put(ADDR_RDYTBL + 7, 8'h80);
    do_tick("fig t1");
    check(mem[ADDR_RDYTBL + 7] == 32'hC0 && wake_state == ACT_UART, "fig t1: prio 62 ready, state 10");
    do_tick("fig t2");
    check(mem[ADDR_RDYGRP] == 32'h81 && mem[ADDR_RDYTBL] == 32'h40 && wake_state == ACT_MEM,
          "fig t2: prio 6 ready, state 00");
    do_tick("fig t3");
    check(mem[ADDR_OSTIME] == 3, "tick counter");

    // random lists
    repeat (30) begin
      int n, base;
      int prios [$];
      clear_mem();
      n = 1 + int'($urandom % 12);
      for (int p = 0; p < 63; p++) prios.push_back(p);
      prios.shuffle();
      put(ADDR_TCBLIST, 32);
      for (int k = 0; k < n; k++) begin
        base = 32 + 4 * k;
        put(base + TCB_NEXT, (k == n - 1) ? 0 : base + 4);
        put(base + TCB_PREV, (k == 0) ? 0 : base - 4);
        put(base + TCB_DLY, $urandom % 4);
        put(base + TCB_PRIO, {2'($urandom), 6'(prios[k])});
      end
      put(ADDR_OSTIME, $urandom % 256);
      repeat (4) do_tick("random");
    end

    // two ticks back to back
    begin
      logic [7:0] t0;
      t0 = mem[ADDR_OSTIME][7:0];
      @(posedge clk); #1 tick_atim = 1'b1;
      @(posedge clk); #1 tick_atim = 1'b0;
      @(posedge clk); #1 tick_atim = 1'b1;
      @(posedge clk); #1 tick_atim = 1'b0;
      repeat (400) @(posedge clk);
      check(mem[ADDR_OSTIME][7:0] == t0 + 8'd2, "queued tick lost");
    end

    // polling with the processor awake
    clear_mem();
    put(ADDR_RDYGRP, 8'h80); put(ADDR_RDYTBL + 7, 8'h80);
    begin
      int s0, c;
      s0 = n_sleep;
      #1 cpu_awake = 1'b1;
      c = 0;
      while (n_sleep == s0 && c < POLL + 10) begin @(posedge clk); #1 c++; end
      check(n_sleep == s0 + 1 && c <= POLL + 5, $sformatf("idle-only: sleep after %0d cycles", c));
      cpu_awake = 1'b0;
      repeat (3 * POLL) @(posedge clk);
      check(n_sleep == s0 + 1, "polled while asleep");
      #1 cpu_awake = 1'b1; cpu_busy = 1'b1;
      repeat (3 * POLL) @(posedge clk);
      check(n_sleep == s0 + 1, "slept with an interrupt waiting");
      #1 cpu_busy = 1'b0;
      mem[ADDR_RDYGRP] = 32'h81; mem[ADDR_RDYTBL] = 32'h04;
      repeat (3 * POLL) @(posedge clk);
      check(n_sleep == s0 + 1, "slept with a ready task");
      mem[ADDR_RDYGRP] = 32'h80; mem[ADDR_RDYTBL] = 32'h00;
      repeat (POLL + 5) @(posedge clk);
      check(n_sleep >= s0 + 2, "no sleep after the task finished");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
