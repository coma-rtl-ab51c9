// coma_atim: auxiliary task and interrupt management (ATIM) unit.
//
// The always-on unit that stands in for the operating system while the
// processor is clock gated. It groups three parts:
//  * coma_tick_timer: the dedicated OS tick timer; ticks go to the processor
//    as an interrupt while it is awake and to the task manager while it sleeps;
//  * coma_task_mgr: watches the ready list through BRAM port B and requests
//    sleep when only the idle task is ready; walks the task control blocks on
//    each tick while the processor sleeps and requests a wake-up in the
//    activation state of the task that became ready;
//  * coma_irq_mgr: wakes the processor and OPB bus for external interrupts,
//    notifies the processor and gives it the source address over the OPB.
// The interrupt unit's wake request is held back while the task manager walks
// the list, so processor and ATIM never update the OS variables at once; and
// the task manager does not put the processor to sleep while a tick or an
// external interrupt is waiting for it (own ordering rules).
module coma_atim
  import coma_pkg::*;
#(
  parameter int unsigned AW          = 11,
  parameter int unsigned TICK_PERIOD = 500000,
  parameter int unsigned POLL_PERIOD = 64,
  parameter int unsigned N_IRQ       = 2,
  parameter logic [2*N_IRQ-1:0]  IRQ_STATE = {ACT_UART, ACT_GPIO},
  parameter logic [32*N_IRQ-1:0] SRC_ADDR  = {32'h4060_0000, 32'h4000_0000},
  parameter logic [31:0]         OPB_BASE  = 32'h4120_0000
) (
  input  logic             clk,          // always-on clock
  input  logic             rst,
  input  logic             awake,        // from the wake-up unit
  input  dom_en_t          dom_en,
  // wake-up unit requests
  output logic             sleep_req,
  output logic             tick_wake,
  output act_state_t       tick_state,
  output logic             irq_wake,
  output act_state_t       irq_state,
  // BRAM port B
  output logic             b_en,
  output logic             b_we,
  output logic [AW-1:0]    b_addr,
  output logic [DW-1:0]    b_wdata,
  input  logic [DW-1:0]    b_rdata,
  // processor side
  input  logic             cpu_clk,
  output logic             tick_irq,
  input  logic             tick_ack,
  output logic             cpu_irq,
  input  logic [N_IRQ-1:0] ext_irq,
  input  logic             opb_clk,
  input  logic             opb_select,
  input  logic             opb_rnw,
  input  logic [31:0]      opb_abus,
  input  logic [31:0]      opb_dbus,
  output logic             sl_xferack,
  output logic [31:0]      sl_dbus,
  output logic             tick          // one-cycle pulse per OS tick
);
  logic tick_atim, busy, pending_any;

  coma_tick_timer #(.PERIOD(TICK_PERIOD)) u_timer (
    .clk(clk), .rst(rst), .cpu_awake(awake), .tick(tick), .tick_atim(tick_atim),
    .tick_irq(tick_irq), .cpu_clk(cpu_clk), .cpu_ack(tick_ack)
  );

  coma_task_mgr #(.AW(AW), .POLL_PERIOD(POLL_PERIOD)) u_task (
    .clk(clk), .rst(rst), .tick_atim(tick_atim), .cpu_awake(awake),
    .cpu_busy(tick_irq || pending_any),
    .b_en(b_en), .b_we(b_we), .b_addr(b_addr), .b_wdata(b_wdata), .b_rdata(b_rdata),
    .sleep_req(sleep_req), .wake_req(tick_wake), .wake_state(tick_state), .busy(busy)
  );

  coma_irq_mgr #(
    .N_IRQ(N_IRQ), .IRQ_STATE(IRQ_STATE), .SRC_ADDR(SRC_ADDR), .OPB_BASE(OPB_BASE)
  ) u_irq (
    .clk(clk), .rst(rst), .ext_irq(ext_irq), .dom_en(dom_en), .hold(busy),
    .wake_req(irq_wake), .wake_state(irq_state), .cpu_irq(cpu_irq),
    .pending_any(pending_any),
    .opb_clk(opb_clk), .opb_select(opb_select), .opb_rnw(opb_rnw),
    .opb_abus(opb_abus), .opb_dbus(opb_dbus), .sl_xferack(sl_xferack), .sl_dbus(sl_dbus)
  );
endmodule
