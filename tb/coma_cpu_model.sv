// coma_cpu_model: behavioural model of the soft processor and its real-time OS
// for the COMA testbenches (not synthesizable, not part of the design).
//
// It runs on the gated clocks of coma_top, so it simply freezes while the
// device sleeps, and plays the example application:
//  * start-up: loads a few code words into the instruction BRAM and builds
//    the task list FFT -> OUT -> IDLE in the data BRAM, with only idle ready;
//  * ISR (on cpu_irq): reads the source address over the OPB, stores the input
//    word, marks the FFT task ready, acknowledges over the OPB at the end;
//  * tick handler (on tick_irq): walks the task list through the LMB port,
//    decrements delays, marks expired tasks ready, counts the tick, acks;
//  * scheduler: picks the highest-priority ready task from OSRdyGrp and
//    OSRdyTbl, sends its priority byte over the FSL, fetches a code word,
//    runs it and then clears its ready bit (FFT, priority 0x05, state 00) or
//    re-delays it by OUT_DELAY ticks (data output, priority 0x8A, state 10;
//    it sends OUT_BYTES bytes one BYTE_TIME apart and spins in between, so
//    its duration does not depend on the processor clock).
// Every run of a task checks that exactly the domains of its state are
// clocked. Counters and check results are outputs.
module coma_cpu_model
  import coma_pkg::*;
#(
  parameter int AW         = 11,
  parameter int DIV        = 16,     // expected CLKDV divider
  parameter int FFT_CYCLES = 2000,
  parameter int OUT_BYTES  = 2,      // bytes sent per data-output run
  parameter realtime BYTE_TIME = 50us, // fixed byte interval of the serial port
  parameter int OUT_DELAY  = 2
) (
  input  logic          clk_cpu, clk_mem, clk_opb, clk_gpio, clk_uart,
  input  realtime       t_in,        // input clock period
  input  logic          start,       // reset released and clocks locked
  output logic          lmb_en,
  output logic [3:0]    lmb_we,
  output logic [AW-1:0] lmb_addr,
  output logic [31:0]   lmb_wdata,
  input  logic [31:0]   lmb_rdata,
  output logic          ilmb_en,
  output logic [3:0]    ilmb_we,
  output logic [AW-1:0] ilmb_addr,
  output logic [31:0]   ilmb_wdata,
  input  logic [31:0]   ilmb_rdata,
  output logic [31:0]   fsl_m_data,
  output logic          fsl_m_write,
  input  logic          fsl_m_full,
  input  logic          tick_irq,
  output logic          tick_ack,
  input  logic          cpu_irq,
  output logic          opb_select,
  output logic          opb_rnw,
  output logic [31:0]   opb_abus,
  output logic [31:0]   opb_dbus,
  input  logic          sl_xferack,
  input  logic [31:0]   sl_dbus,
  input  act_state_t    act_state,
  input  dom_en_t       dom_en,
  output bit            os_started,
  output int            n_isr, n_fft, n_out, n_cpu_tick, n_fsl, n_slow_task,
  output longint        out_cycles,  // processor cycles spent in data output
  output int            checks, failures
);
  localparam logic [7:0] PRIO_FFT = 8'h05, PRIO_OUT = 8'h8A, PRIO_IDLE = 8'h3F;
  localparam int TCB_FFT = 64, TCB_OUT = 68, TCB_IDLE = 72, DATA = 128;

  int uart_edges = 0, gpio_edges = 0, opb_edges = 0;
  always @(posedge clk_uart) uart_edges++;
  always @(posedge clk_gpio) gpio_edges++;
  always @(posedge clk_opb)  opb_edges++;

  initial begin
    lmb_en = 1'b0; lmb_we = '0; lmb_addr = '0; lmb_wdata = '0;
    ilmb_en = 1'b0; ilmb_we = '0; ilmb_addr = '0; ilmb_wdata = '0;
    fsl_m_data = '0; fsl_m_write = 1'b0; tick_ack = 1'b0;
    opb_select = 1'b0; opb_rnw = 1'b0; opb_abus = '0; opb_dbus = '0;
    os_started = 1'b0;
    out_cycles = 0;
    n_isr = 0; n_fft = 0; n_out = 0; n_cpu_tick = 0; n_fsl = 0; n_slow_task = 0;
    checks = 0; failures = 0;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", msg, $time); end
  endtask

  function automatic logic [31:0] code_word(int a);
    return 32'hB000_0000 | 32'(a * 4);
  endfunction

  // ---------------- bus primitives ----------------
  task automatic mem_rd(input int a, output logic [31:0] d);
    @(posedge clk_mem); lmb_en <= 1'b1; lmb_we <= '0; lmb_addr <= AW'(a);
    @(posedge clk_mem); lmb_en <= 1'b0;
    #1 d = lmb_rdata;
  endtask

  task automatic mem_wr(input int a, input logic [31:0] d);
    @(posedge clk_mem); lmb_en <= 1'b1; lmb_we <= 4'hF; lmb_addr <= AW'(a); lmb_wdata <= d;
    @(posedge clk_mem); lmb_en <= 1'b0; lmb_we <= '0;
  endtask

  task automatic fetch(input int a);
    @(posedge clk_mem); ilmb_en <= 1'b1; ilmb_we <= '0; ilmb_addr <= AW'(a);
    @(posedge clk_mem); ilmb_en <= 1'b0;
    #1 check(ilmb_rdata == code_word(a), "instruction fetch");
  endtask

  task automatic opb_xfer(input bit rd, input logic [31:0] a, input logic [31:0] wd,
                          output logic [31:0] d);
    @(posedge clk_opb);
    opb_select <= 1'b1; opb_rnw <= rd; opb_abus <= a; opb_dbus <= wd;
    do @(posedge clk_opb); while (!sl_xferack);
    d = sl_dbus;
    opb_select <= 1'b0; opb_abus <= '0; opb_dbus <= '0;
  endtask

  task automatic fsl_send(input logic [7:0] prio);
    @(posedge clk_cpu);
    while (fsl_m_full) @(posedge clk_cpu);
    fsl_m_data <= {24'd0, prio}; fsl_m_write <= 1'b1;
    @(posedge clk_cpu); fsl_m_write <= 1'b0;
    n_fsl++;
    repeat (12) @(posedge clk_cpu);
    check(act_state == act_state_t'(prio[7:6]), $sformatf("state %b after FSL %h", act_state, prio));
  endtask

  task automatic make_ready(input logic [7:0] p);
    logic [31:0] v;
    mem_rd(ADDR_RDYGRP, v);            mem_wr(ADDR_RDYGRP, v | (32'd1 << p[5:3]));
    mem_rd(ADDR_RDYTBL + p[5:3], v);   mem_wr(ADDR_RDYTBL + p[5:3], v | (32'd1 << p[2:0]));
  endtask

  task automatic make_unready(input logic [7:0] p);
    logic [31:0] v;
    mem_rd(ADDR_RDYTBL + p[5:3], v);
    v = v & ~(32'd1 << p[2:0]);
    mem_wr(ADDR_RDYTBL + p[5:3], v);
    if (v[7:0] == 0) begin
      mem_rd(ADDR_RDYGRP, v); mem_wr(ADDR_RDYGRP, v & ~(32'd1 << p[5:3]));
    end
  endtask

  // ---------------- OS ----------------
  task automatic isr();
    logic [31:0] src, d;
    n_isr++;
    check(dom_en.opb && dom_en.gpio, "ISR without OPB and GPIO clocks");
    opb_xfer(1'b1, 32'h4120_0000, '0, src);
    check(src == 32'h4000_0000, $sformatf("interrupt source address %h", src));
    mem_wr(DATA + (n_isr % 32), 32'h100 + n_isr);
    make_ready(PRIO_FFT);
    opb_xfer(1'b0, 32'h4120_0008, 32'h1, d);
    while (cpu_irq) @(posedge clk_cpu);
  endtask

  task automatic tick_handler();
    logic [31:0] p, dly, pr, t;
    n_cpu_tick++;
    mem_rd(ADDR_TCBLIST, p);
    while (p != 0) begin
      mem_rd(int'(p) + TCB_DLY, dly);
      if (dly != 0) begin
        mem_wr(int'(p) + TCB_DLY, dly - 1);
        if (dly == 1) begin mem_rd(int'(p) + TCB_PRIO, pr); make_ready(pr[7:0]); end
      end
      mem_rd(int'(p) + TCB_NEXT, p);
    end
    mem_rd(ADDR_OSTIME, t); mem_wr(ADDR_OSTIME, (t + 1) & 32'hFF);
    @(posedge clk_cpu); tick_ack <= 1'b1;
    @(posedge clk_cpu); tick_ack <= 1'b0;
    while (tick_irq) @(posedge clk_cpu);
  endtask

  function automatic int lowest_bit(logic [7:0] v);
    for (int i = 0; i < 8; i++) if (v[i]) return i;
    return 8;
  endfunction

  task automatic run_task(input logic [7:0] p);
    fsl_send(p);
    fetch(int'(p[5:0]));
    if (p == PRIO_FFT) begin
      logic [31:0] d;
      int e_opb;
      n_fft++;
      check(!dom_en.opb && !dom_en.gpio && !dom_en.uart, "state 00 runs peripheral clocks");
      e_opb = opb_edges;
      mem_rd(DATA + (n_isr % 32), d);
      check(d == 32'h100 + n_isr, "input word lost");
      repeat (FFT_CYCLES) @(posedge clk_cpu);        // the computation
      mem_wr(DATA + 32 + (n_isr % 32), d * 3);
      check(opb_edges == e_opb, "OPB clock ran in state 00");
      make_unready(PRIO_FFT);
    end else if (p == PRIO_OUT) begin
      realtime t0;
      int eu, eg;
      n_out++;
      @(posedge clk_cpu); t0 = $realtime;
      @(posedge clk_cpu);
      check($realtime - t0 == DIV * t_in,
            $sformatf("cpu clock period %0t in state 10", $realtime - t0));
      if ($realtime - t0 == DIV * t_in) n_slow_task++;
      eu = uart_edges; eg = gpio_edges;
      for (int b = 0; b < OUT_BYTES; b++) begin     // send the results
        realtime t_end;
        t_end = $realtime + BYTE_TIME;
        while ($realtime < t_end) begin @(posedge clk_cpu); out_cycles++; end
      end
      check(uart_edges - eu >= int'(OUT_BYTES * BYTE_TIME / (DIV * t_in)) - 2 && gpio_edges == eg,
            "state 10 domains");
      mem_wr(TCB_OUT + TCB_DLY, OUT_DELAY);
      make_unready(PRIO_OUT);
    end
  endtask

  initial begin : cpu
    logic [31:0] g, t;
    wait (start);
    @(posedge clk_mem);
    repeat (4) @(posedge clk_cpu);
    for (int a = 0; a < 64; a++) begin
      @(posedge clk_mem); ilmb_en <= 1'b1; ilmb_we <= 4'hF; ilmb_addr <= AW'(a);
      ilmb_wdata <= code_word(a);
    end
    @(posedge clk_mem); ilmb_en <= 1'b0; ilmb_we <= '0;
    mem_wr(ADDR_TCBLIST, TCB_FFT);
    mem_wr(TCB_FFT + TCB_NEXT, TCB_OUT);  mem_wr(TCB_FFT + TCB_DLY, 0);  mem_wr(TCB_FFT + TCB_PRIO, PRIO_FFT);
    mem_wr(TCB_OUT + TCB_NEXT, TCB_IDLE); mem_wr(TCB_OUT + TCB_PREV, TCB_FFT);
    mem_wr(TCB_OUT + TCB_DLY, OUT_DELAY); mem_wr(TCB_OUT + TCB_PRIO, PRIO_OUT);
    mem_wr(TCB_IDLE + TCB_NEXT, 0);       mem_wr(TCB_IDLE + TCB_PREV, TCB_OUT);
    mem_wr(TCB_IDLE + TCB_DLY, 0);        mem_wr(TCB_IDLE + TCB_PRIO, PRIO_IDLE);
    mem_wr(ADDR_OSTIME, 0);
    for (int i = 0; i < 8; i++) mem_wr(ADDR_RDYTBL + i, (i == 7) ? 32'h80 : 32'h0);
    mem_wr(ADDR_RDYGRP, 32'h80);
    os_started = 1'b1;
    forever begin
      @(posedge clk_cpu);
      if (cpu_irq) isr();
      else if (tick_irq) tick_handler();
      else begin
        int y, x;
        mem_rd(ADDR_RDYGRP, g);
        y = lowest_bit(g[7:0]);
        if (y < 8) begin
          mem_rd(ADDR_RDYTBL + y, t);
          x = lowest_bit(t[7:0]);
          if (x < 8 && 8 * y + x != IDLE_PRIO)
            run_task((8 * y + x == int'(PRIO_FFT[5:0])) ? PRIO_FFT : PRIO_OUT);
        end
      end
    end
  end
endmodule
