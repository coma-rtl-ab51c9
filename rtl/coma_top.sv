// coma_top: COMA energy-management subsystem for a soft processor running an RTOS.
//
// Wires together, as in the system configuration figure: the clock management
// unit (DCM, clock multiplexer, per-domain clock gates), the selective
// component wake-up unit, the ATIM unit (tick timer, task manager, interrupt
// manager), the FSL link through which the processor sets the activation
// state, and the dual-port BRAM whose port A is the processor's data-side LMB
// port and whose port B belongs to the ATIM.
//
// The processor, the LMB and OPB controllers and the OPB peripherals are not
// part of this RTL. Their connections are ports: the gated clocks clk_cpu,
// clk_mem, clk_opb, clk_gpio and clk_uart; BRAM port A (on clk_mem); the FSL
// master (on clk_cpu); the tick interrupt and its acknowledge (on clk_cpu);
// the external-interrupt notification and the OPB slave port (on clk_opb);
// the peripherals' interrupt lines.
//
// Reset (asynchronous, active high) leaves the device awake in state 11.
module coma_top
  import coma_pkg::*;
#(
  parameter int unsigned AW           = 11,
  parameter int unsigned CLKDV_DIVIDE = 16,
  parameter int unsigned TICK_PERIOD  = 500000,
  parameter int unsigned POLL_PERIOD  = 64,
  parameter int unsigned N_IRQ        = 2,
  parameter logic [2*N_IRQ-1:0]  IRQ_STATE = {ACT_UART, ACT_GPIO},
  parameter logic [32*N_IRQ-1:0] SRC_ADDR  = {32'h4060_0000, 32'h4000_0000},
  parameter logic [31:0]         OPB_BASE  = 32'h4120_0000
) (
  input  logic             clk_in,
  input  logic             rst,
  // gated clocks
  output logic             clk_cpu,
  output logic             clk_mem,
  output logic             clk_opb,
  output logic             clk_gpio,
  output logic             clk_uart,
  output logic             dcm_locked,
  // BRAM port A (data-side LMB), clk_mem
  input  logic             lmb_en,
  input  logic [DW/8-1:0]  lmb_we,
  input  logic [AW-1:0]    lmb_addr,
  input  logic [DW-1:0]    lmb_wdata,
  output logic [DW-1:0]    lmb_rdata,
  // instruction BRAM port (instruction-side LMB), clk_mem; writes load code
  input  logic             ilmb_en,
  input  logic [DW/8-1:0]  ilmb_we,
  input  logic [AW-1:0]    ilmb_addr,
  input  logic [DW-1:0]    ilmb_wdata,
  output logic [DW-1:0]    ilmb_rdata,
  // FSL master from the processor, clk_cpu
  input  logic [DW-1:0]    fsl_m_data,
  input  logic             fsl_m_write,
  output logic             fsl_m_full,
  // interrupts to the processor
  output logic             tick_irq,
  input  logic             tick_ack,
  output logic             cpu_irq,
  input  logic [N_IRQ-1:0] ext_irq,
  // OPB slave of the interrupt manager, clk_opb
  input  logic             opb_select,
  input  logic             opb_rnw,
  input  logic [31:0]      opb_abus,
  input  logic [31:0]      opb_dbus,
  output logic             sl_xferack,
  output logic [31:0]      sl_dbus,
  // status
  output logic             awake,
  output act_state_t       act_state,
  output dom_en_t          dom_en,
  output logic             tick
);
  logic          clk_root, clk_main, sel_slow;
  logic          sleep_req, tick_wake, irq_wake;
  act_state_t    tick_state, irq_state;
  logic [DW-1:0] fsl_s_data;
  logic          fsl_s_exists, fsl_s_read;
  logic          b_en, b_we;
  logic [AW-1:0] b_addr;
  logic [DW-1:0] b_wdata, b_rdata;
  logic [DW-1:0] ib_rdata;

  coma_clock_mgmt #(.CLKDV_DIVIDE(CLKDV_DIVIDE)) u_clk (
    .clk_in(clk_in), .rst(rst), .sel_slow(sel_slow), .dom_en(dom_en),
    .clk_root(clk_root), .clk_main(clk_main),
    .clk_cpu(clk_cpu), .clk_mem(clk_mem), .clk_opb(clk_opb),
    .clk_gpio(clk_gpio), .clk_uart(clk_uart), .locked(dcm_locked)
  );

  coma_wakeup_unit u_wake (
    .clk(clk_root), .rst(rst), .sleep_req(sleep_req),
    .tick_wake(tick_wake), .tick_state(tick_state),
    .irq_wake(irq_wake), .irq_state(irq_state),
    .fsl_data(fsl_s_data), .fsl_exists(fsl_s_exists), .fsl_read(fsl_s_read),
    .awake(awake), .state(act_state), .dom_en(dom_en), .sel_slow(sel_slow)
  );

  coma_fsl #(.WIDTH(DW)) u_fsl (
    .rst(rst), .m_clk(clk_cpu), .m_data(fsl_m_data), .m_write(fsl_m_write),
    .m_full(fsl_m_full), .s_clk(clk_root), .s_data(fsl_s_data),
    .s_exists(fsl_s_exists), .s_read(fsl_s_read)
  );

  coma_atim #(
    .AW(AW), .TICK_PERIOD(TICK_PERIOD), .POLL_PERIOD(POLL_PERIOD), .N_IRQ(N_IRQ),
    .IRQ_STATE(IRQ_STATE), .SRC_ADDR(SRC_ADDR), .OPB_BASE(OPB_BASE)
  ) u_atim (
    .clk(clk_root), .rst(rst), .awake(awake), .dom_en(dom_en),
    .sleep_req(sleep_req), .tick_wake(tick_wake), .tick_state(tick_state),
    .irq_wake(irq_wake), .irq_state(irq_state),
    .b_en(b_en), .b_we(b_we), .b_addr(b_addr), .b_wdata(b_wdata), .b_rdata(b_rdata),
    .cpu_clk(clk_cpu), .tick_irq(tick_irq), .tick_ack(tick_ack), .cpu_irq(cpu_irq),
    .ext_irq(ext_irq), .opb_clk(clk_opb), .opb_select(opb_select), .opb_rnw(opb_rnw),
    .opb_abus(opb_abus), .opb_dbus(opb_dbus), .sl_xferack(sl_xferack), .sl_dbus(sl_dbus),
    .tick(tick)
  );

  coma_dpbram #(.AW(AW), .DW(DW)) u_bram (
    .clka(clk_mem), .ena(lmb_en), .wea(lmb_we), .addra(lmb_addr), .dina(lmb_wdata),
    .douta(lmb_rdata),
    .clkb(clk_root), .enb(b_en), .web(b_we), .addrb(b_addr), .dinb(b_wdata),
    .doutb(b_rdata)
  );

  coma_dpbram #(.AW(AW), .DW(DW)) u_ibram (
    .clka(clk_mem), .ena(ilmb_en), .wea(ilmb_we), .addra(ilmb_addr), .dina(ilmb_wdata),
    .douta(ilmb_rdata),
    .clkb(clk_root), .enb(1'b0), .web(1'b0), .addrb('0), .dinb('0), .doutb(ib_rdata)
  );
endmodule
