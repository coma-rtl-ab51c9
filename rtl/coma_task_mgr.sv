// coma_task_mgr: ready-list monitor and OS clock-tick manager of the ATIM unit.
//
// Works on the MicroC/OS-II variables that the processor keeps in the shared
// dual-port BRAM, through BRAM port B (addresses in coma_pkg).
//
// Ready-list monitor: while the processor is awake, every POLL_PERIOD cycles
// the unit reads OSRdyGrp and OSRdyTbl[7]. If only the idle task (priority 63)
// is ready, i.e. OSRdyGrp = 0x80 and OSRdyTbl[7] = 0x80, and no tick or
// external interrupt is waiting for the processor (cpu_busy = 0), it pulses
// sleep_req and the wake-up unit gates the processor side off.
//
// Tick manager: while the processor is gated off, each tick (tick_atim) starts
// a walk of the task-control-block list from OSTCBList along the OSTCBNext
// pointers until a null pointer. A non-zero OSTCBDly is decremented; when it
// reaches zero the task becomes ready: bit Y (priority bits [5:3]) of OSRdyGrp
// and bit X (bits [2:0]) of OSRdyTbl[Y] are set. After the walk the 8-bit tick
// counter is incremented and, if any task became ready, wake_req is pulsed
// with wake_state = alias bits [7:6] of the highest-priority (lowest number)
// task made ready. A tick that arrives during a walk is remembered and walked
// next. The walk stops after MAX_TCB blocks even if the list does not end.
// busy is high during a walk; the processor must not be woken then.
//
// Timing: port B has one cycle of read latency. A walk keeps busy high for
// 5 + 4*N + 6*R cycles for N blocks of which R become ready; wake_req follows
// in the cycle after busy falls. What follows the document: the variables, the decrement-and-mark
// rule, the idle-only test and the hand-back on a ready task. Own choices:
// the memory layout, the poll period, the choice among several ready tasks,
// the walk guard and the ordering rules against a waiting interrupt.
module coma_task_mgr
  import coma_pkg::*;
#(
  parameter int unsigned AW          = 11,
  parameter int unsigned POLL_PERIOD = 64,
  parameter int unsigned MAX_TCB     = 64
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          tick_atim,   // tick while the processor sleeps
  input  logic          cpu_awake,
  input  logic          cpu_busy,    // interrupt waiting for the processor
  // BRAM port B
  output logic          b_en,
  output logic          b_we,
  output logic [AW-1:0] b_addr,
  output logic [DW-1:0] b_wdata,
  input  logic [DW-1:0] b_rdata,
  // to the wake-up unit
  output logic          sleep_req,
  output logic          wake_req,
  output act_state_t    wake_state,
  output logic          busy
);
  typedef enum logic [4:0] {
    S_IDLE, S_POLL_GRP, S_POLL_TBL, S_POLL_CHK,
    S_LIST, S_LIST_D, S_DLY, S_DLY_D, S_PRIO, S_PRIO_D,
    S_GRP, S_GRP_D, S_TBL, S_TBL_D, S_NEXT, S_NEXT_D,
    S_TIME, S_TIME_D, S_END
  } st_t;

  localparam int unsigned PCW = $clog2(POLL_PERIOD + 1);
  localparam int unsigned TCW = $clog2(MAX_TCB + 1);

  st_t            st;
  logic [PCW-1:0] poll_cnt;
  logic [TCW-1:0] walked;
  logic [AW-1:0]  ptr;
  logic [7:0]     prio;
  logic [7:0]     grp;
  logic           found;
  logic [7:0]     best;
  logic           tick_q;

  // Bus request of the current state (reads return data in the next state).
  always_comb begin
    b_en    = 1'b0;
    b_we    = 1'b0;
    b_addr  = '0;
    b_wdata = '0;
    unique case (st)
      S_POLL_GRP: begin b_en = 1'b1; b_addr = AW'(ADDR_RDYGRP); end
      S_POLL_TBL: begin b_en = 1'b1; b_addr = AW'(ADDR_RDYTBL + 7); end
      S_LIST:     begin b_en = 1'b1; b_addr = AW'(ADDR_TCBLIST); end
      S_DLY:      begin b_en = 1'b1; b_addr = ptr + AW'(TCB_DLY); end
      S_DLY_D:    if (b_rdata[15:0] != 16'd0) begin
                    b_en = 1'b1; b_we = 1'b1; b_addr = ptr + AW'(TCB_DLY);
                    b_wdata = {16'd0, b_rdata[15:0] - 16'd1};
                  end
      S_PRIO:     begin b_en = 1'b1; b_addr = ptr + AW'(TCB_PRIO); end
      S_GRP:      begin b_en = 1'b1; b_addr = AW'(ADDR_RDYGRP); end
      S_GRP_D:    begin
                    b_en = 1'b1; b_we = 1'b1; b_addr = AW'(ADDR_RDYGRP);
                    b_wdata = {24'd0, b_rdata[7:0] | (8'd1 << prio[5:3])};
                  end
      S_TBL:      begin b_en = 1'b1; b_addr = AW'(ADDR_RDYTBL) + AW'(prio[5:3]); end
      S_TBL_D:    begin
                    b_en = 1'b1; b_we = 1'b1; b_addr = AW'(ADDR_RDYTBL) + AW'(prio[5:3]);
                    b_wdata = {24'd0, b_rdata[7:0] | (8'd1 << prio[2:0])};
                  end
      S_NEXT:     begin b_en = 1'b1; b_addr = ptr + AW'(TCB_NEXT); end
      S_TIME:     begin b_en = 1'b1; b_addr = AW'(ADDR_OSTIME); end
      S_TIME_D:   begin
                    b_en = 1'b1; b_we = 1'b1; b_addr = AW'(ADDR_OSTIME);
                    b_wdata = {24'd0, b_rdata[7:0] + 8'd1};
                  end
      default: ;
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      st         <= S_IDLE;
      poll_cnt   <= '0;
      walked     <= '0;
      ptr        <= '0;
      prio       <= '0;
      grp        <= '0;
      found      <= 1'b0;
      best       <= '0;
      tick_q     <= 1'b0;
      sleep_req  <= 1'b0;
      wake_req   <= 1'b0;
      wake_state <= ACT_MEM;
    end else begin
      sleep_req <= 1'b0;
      wake_req  <= 1'b0;
      if (tick_atim) tick_q <= 1'b1;

      unique case (st)
        S_IDLE: begin
          if (tick_q || tick_atim) begin
            tick_q <= 1'b0;
            found  <= 1'b0;
            walked <= '0;
            st     <= S_LIST;
          end else if (cpu_awake) begin
            if (poll_cnt == PCW'(POLL_PERIOD - 1)) begin
              poll_cnt <= '0;
              st       <= S_POLL_GRP;
            end else begin
              poll_cnt <= poll_cnt + 1'b1;
            end
          end else begin
            poll_cnt <= '0;
          end
        end
        S_POLL_GRP: st <= S_POLL_TBL;
        S_POLL_TBL: begin grp <= b_rdata[7:0]; st <= S_POLL_CHK; end
        S_POLL_CHK: begin
          if (grp == 8'h80 && b_rdata[7:0] == 8'h80 && !cpu_busy && cpu_awake)
            sleep_req <= 1'b1;
          st <= S_IDLE;
        end
        S_LIST:   st <= S_LIST_D;
        S_LIST_D: begin
          ptr <= b_rdata[AW-1:0];
          st  <= (b_rdata[AW-1:0] == '0) ? S_TIME : S_DLY;
        end
        S_DLY:    st <= S_DLY_D;
        S_DLY_D:  st <= (b_rdata[15:0] == 16'd1) ? S_PRIO : S_NEXT;
        S_PRIO:   st <= S_PRIO_D;
        S_PRIO_D: begin prio <= b_rdata[7:0]; st <= S_GRP; end
        S_GRP:    st <= S_GRP_D;
        S_GRP_D:  st <= S_TBL;
        S_TBL:    st <= S_TBL_D;
        S_TBL_D: begin
          if (!found || prio[5:0] < best[5:0]) best <= prio;
          found <= 1'b1;
          st    <= S_NEXT;
        end
        S_NEXT:   begin walked <= walked + 1'b1; st <= S_NEXT_D; end
        S_NEXT_D: begin
          ptr <= b_rdata[AW-1:0];
          st  <= (b_rdata[AW-1:0] == '0 || walked == TCW'(MAX_TCB)) ? S_TIME : S_DLY;
        end
        S_TIME:   st <= S_TIME_D;
        S_TIME_D: st <= S_END;
        S_END: begin
          if (found) begin
            wake_req   <= 1'b1;
            wake_state <= act_state_t'(best[7:6]);
          end
          st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = !(st inside {S_IDLE, S_POLL_GRP, S_POLL_TBL, S_POLL_CHK});
endmodule
