// coma_irq_mgr: interrupt management unit of the ATIM.
//
// External interrupt lines (from the OPB peripherals, e.g. the GPIO data-input
// interrupt) are synchronised to the always-on clock and a rising edge sets a
// pending bit. While a source is pending the unit
//  (1) asks the wake-up unit (wake_req, level) to run the domains of that
//      source's activation state IRQ_STATE[i] if any of them is gated off,
//      which always includes the processor and the OPB bus;
//  (2) once the processor and the OPB bus run, notifies the processor with the
//      level interrupt cpu_irq;
//  (3) answers the processor's queries over the OPB bus: the address of the
//      highest-priority (lowest-numbered) pending source, SRC_ADDR[i].
// When processor and OPB already run, step (1) is skipped.
// wake_req is held back while hold = 1 (the task manager is walking the task
// list). The unit does not hold a wake request itself after it is served.
//
// OPB register map (offsets from OPB_BASE, 32-bit, single-beat transfers,
// acknowledged one OPB clock after select; the data bus is 0 when not
// acknowledging, as on an OR-ed OPB):
//   0x0 SRC  read : address of the highest-priority pending source, 0 if none
//   0x4 PEND read : pending bit mask
//   0x8 ACK  write: a 1 in bit i clears pending source i (end of its ISR)
// The acknowledge crosses to the always-on clock as one toggle per source.
// Register map, source priority and the acknowledge are this design's choices;
// the three steps and the activity check follow the document.
module coma_irq_mgr
  import coma_pkg::*;
#(
  parameter int unsigned N_IRQ    = 2,
  parameter logic [2*N_IRQ-1:0]  IRQ_STATE = {ACT_UART, ACT_GPIO},
  parameter logic [32*N_IRQ-1:0] SRC_ADDR  = {32'h4060_0000, 32'h4000_0000},
  parameter logic [31:0]         OPB_BASE  = 32'h4120_0000
) (
  input  logic             clk,        // always-on clock
  input  logic             rst,
  input  logic [N_IRQ-1:0] ext_irq,
  input  dom_en_t          dom_en,     // domains currently running
  input  logic             hold,
  output logic             wake_req,
  output act_state_t       wake_state,
  output logic             cpu_irq,
  output logic             pending_any,
  // OPB slave, in the OPB clock domain
  input  logic             opb_clk,
  input  logic             opb_select,
  input  logic             opb_rnw,
  input  logic [31:0]      opb_abus,
  input  logic [31:0]      opb_dbus,
  output logic             sl_xferack,
  output logic [31:0]      sl_dbus
);
  logic [N_IRQ-1:0] irq_s1, irq_s2, irq_s3;
  logic [N_IRQ-1:0] pending;
  logic [N_IRQ-1:0] ack_tgl;
  logic [N_IRQ-1:0] ack_s1, ack_s2, ack_s3;
  logic [N_IRQ-1:0] pend_o1, pend_o2;
  logic [1:0]       need;
  dom_en_t          need_dom;

  // always-on clock domain
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      irq_s1  <= '0; irq_s2 <= '0; irq_s3 <= '0;
      ack_s1  <= '0; ack_s2 <= '0; ack_s3 <= '0;
      pending <= '0;
    end else begin
      irq_s1 <= ext_irq; irq_s2 <= irq_s1; irq_s3 <= irq_s2;
      ack_s1 <= ack_tgl; ack_s2 <= ack_s1; ack_s3 <= ack_s2;
      pending <= (pending & ~(ack_s3 ^ ack_s2)) | (irq_s2 & ~irq_s3);
    end
  end

  always_comb begin
    need = '0;
    for (int i = 0; i < N_IRQ; i++)
      if (pending[i]) need = need | IRQ_STATE[2*i +: 2];
  end

  assign need_dom    = state_domains(act_state_t'(need));
  assign pending_any = |pending;
  assign wake_state  = act_state_t'(need);
  assign wake_req    = pending_any && !hold && ((need_dom & ~dom_en) != '0);
  assign cpu_irq     = pending_any && dom_en.cpu && dom_en.opb;

  // OPB clock domain
  logic        hit;
  logic [31:0] src;

  assign hit = opb_select && (opb_abus[31:4] == OPB_BASE[31:4]);

  always_comb begin
    src = '0;
    for (int i = N_IRQ - 1; i >= 0; i--)
      if (pend_o2[i]) src = SRC_ADDR[32*i +: 32];
  end

  always_ff @(posedge opb_clk or posedge rst) begin
    if (rst) begin
      pend_o1    <= '0;
      pend_o2    <= '0;
      ack_tgl    <= '0;
      sl_xferack <= 1'b0;
      sl_dbus    <= '0;
    end else begin
      pend_o1    <= pending;
      pend_o2    <= pend_o1;
      sl_xferack <= hit && !sl_xferack;
      sl_dbus    <= '0;
      if (hit && !sl_xferack) begin
        if (opb_rnw) begin
          unique case (opb_abus[3:2])
            2'd0:    sl_dbus <= src;
            2'd1:    sl_dbus <= 32'(pend_o2);
            default: sl_dbus <= '0;
          endcase
        end else if (opb_abus[3:2] == 2'd2) begin
          ack_tgl <= ack_tgl ^ opb_dbus[N_IRQ-1:0];
        end
      end
    end
  end

  a_ack_only_when_selected: assert property (@(posedge opb_clk) disable iff (rst)
    sl_xferack |-> $past(opb_select));
endmodule
