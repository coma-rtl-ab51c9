// coma_wakeup_unit: selective component wake-up management unit.
//
// Holds the activation state of the device: whether the processor side is
// awake, and which of the four activation states (see coma_pkg) it is in. The
// state decides which clock domains the clock management unit lets run and
// whether they run from CLK0 or CLKDV.
//
// Requests, in order of precedence within one clock cycle:
//  * tick_wake (pulse, from the ATIM task manager after a tick made a task
//    ready): wake up in tick_state, the alias bits of that task's priority.
//  * irq_wake (level, from the interrupt management unit): wake up in
//    irq_state; when already awake, the union of the current state and
//    irq_state is taken (the two-bit OR of two states runs every domain either
//    one runs). Merging with the current state is this design's choice.
//  * a word from the processor's FSL link: bits [7:6] of the word (the alias
//    bits of the 8-bit priority of the task about to run) become the state.
//  * sleep_req (pulse, from the ATIM when only the idle task is ready): all
//    domains are gated off; the state itself is kept.
// Reset wakes the device in state 11, everything running (own choice).
// Timing: outputs are registered; a request changes dom_en on the next clock
// edge, and the clock gates follow within one more cycle.
module coma_wakeup_unit
  import coma_pkg::*;
(
  input  logic          clk,          // always-on clock
  input  logic          rst,          // asynchronous, active high
  input  logic          sleep_req,
  input  logic          tick_wake,
  input  act_state_t    tick_state,
  input  logic          irq_wake,
  input  act_state_t    irq_state,
  input  logic [DW-1:0] fsl_data,
  input  logic          fsl_exists,
  output logic          fsl_read,
  output logic          awake,
  output act_state_t    state,
  output dom_en_t       dom_en,
  output logic          sel_slow
);
  assign fsl_read = fsl_exists;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      awake <= 1'b1;
      state <= ACT_ALL;
    end else if (tick_wake) begin
      awake <= 1'b1;
      state <= tick_state;
    end else if (irq_wake) begin
      awake <= 1'b1;
      state <= awake ? act_state_t'(state | irq_state) : irq_state;
    end else if (fsl_exists) begin
      state <= act_state_t'(fsl_data[7:6]);
    end else if (sleep_req) begin
      awake <= 1'b0;
    end
  end

  assign dom_en   = awake ? state_domains(state) : '0;
  assign sel_slow = state_slow(state);
endmodule
