// coma_rate_lane: one coma_top with the processor/OS model and a periodic
// GPIO data source, used by the data-rate testbench. Data words arrive every
// INTERVAL ticks and the data-output task runs every INTERVAL ticks, over a
// window of RUN_TICKS ticks. The lane counts input-clock cycles spent asleep
// and awake in each activation state, and reports the dynamic energy of the
// FPGA from the per-state power of the example application (0.212 W in state
// 00, 0.464 W in 01, 0.026 W in 10 on CLKDV, 0.494 W in 11, nothing while
// the processor clock is off) against running the whole time in state 11.
// The state 10 power is the one measured on CLKDV = input / 16; CLKDV_DIVIDE
// changes the slow clock for the frequency sweep, which uses the time shares.
module coma_rate_lane
  import coma_pkg::*;
#(
  parameter int TICK_PERIOD = 20000,
  parameter int INTERVAL    = 2,
  parameter int RUN_TICKS   = 64,
  parameter int CLKDV_DIVIDE = 16
) (
  input  logic clk_in,
  input  logic rst,
  output bit   done,
  output real  reduction,           // energy reduction against state 11
  output int   n_in, n_fft, n_out, n_walk, n_sleep, n_slow_task,
  output longint out_cycles,        // processor cycles spent in data output
  output real  share_s10,           // share of the window awake in state 10
  output int   checks, failures
);
  localparam int AW = 11;
  localparam real P_STATE [4] = '{0.212, 0.464, 0.026, 0.494};

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

  coma_top #(.TICK_PERIOD(TICK_PERIOD), .CLKDV_DIVIDE(CLKDV_DIVIDE)) dut (.*);

  int n_isr, n_cpu_tick, n_fsl;
  bit os_started;
  realtime t_in = 20.0;

  coma_cpu_model #(.AW(AW), .DIV(CLKDV_DIVIDE), .FFT_CYCLES(2000), .OUT_BYTES(2), .OUT_DELAY(INTERVAL)) cpu (
    .*, .start(dcm_locked && !rst)
  );

  longint cyc_state [4] = '{0, 0, 0, 0};
  longint cyc_sleep = 0;
  bit     measuring = 1'b0;
  logic   awake_q = 1'b1;

  always @(posedge clk_in) if (!rst) begin
    awake_q <= awake;
    if (awake_q && !awake) n_sleep++;
    if (dut.u_atim.u_task.st == dut.u_atim.u_task.S_LIST) n_walk++;
    if (measuring) begin
      if (awake) cyc_state[act_state]++;
      else       cyc_sleep++;
    end
  end

  initial begin
    n_in = 0; n_walk = 0; n_sleep = 0; done = 1'b0; reduction = 0.0; share_s10 = 0.0;
  end

  initial begin : env
    real e, e_base;
    longint total;
    wait (os_started);
    @(posedge tick);
    measuring = 1'b1;
    for (int t = 0; t < RUN_TICKS; t++) begin
      if (t % INTERVAL == 0) begin
        repeat (1000) @(posedge clk_in);
        ext_irq[0] = 1'b1;
        repeat (50) @(posedge clk_in);
        ext_irq[0] = 1'b0;
        n_in++;
      end
      @(posedge tick);
    end
    measuring = 1'b0;
    total = cyc_sleep;
    e = 0.0;
    for (int s = 0; s < 4; s++) begin
      total += cyc_state[s];
      e += P_STATE[s] * real'(cyc_state[s]);
    end
    e_base = P_STATE[3] * real'(total);
    reduction = 1.0 - e / e_base;
    share_s10 = real'(cyc_state[2]) / real'(total);
    $display("divider=%0d interval=%0d ticks: inputs=%0d fft=%0d out=%0d walks=%0d sleeps=%0d asleep=%0.1f%% s00=%0.2f%% s01=%0.2f%% s10=%0.2f%% s11=%0.2f%% energy reduction=%0.1f%%",
             CLKDV_DIVIDE, INTERVAL, n_in, n_fft, n_out, n_walk, n_sleep,
             100.0 * real'(cyc_sleep) / real'(total),
             100.0 * real'(cyc_state[0]) / real'(total), 100.0 * real'(cyc_state[1]) / real'(total),
             100.0 * real'(cyc_state[2]) / real'(total), 100.0 * real'(cyc_state[3]) / real'(total),
             100.0 * reduction);
    done = 1'b1;
  end
endmodule
