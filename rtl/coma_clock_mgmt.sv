// coma_clock_mgmt: clock management unit.
//
// A DCM derives CLK0 (the input clock) and CLKDV (input / CLKDV_DIVIDE) from the
// board clock. A glitch-free multiplexer picks one of them as the main clock
// (sel_slow = 1 picks CLKDV), and one clock gate per domain passes the main
// clock to the processor, the memory controllers, the OPB bus and the two
// peripherals when that domain's enable is set. This is the structure of the
// clock management figure; splitting the single "hardware peripherals" gate
// into a GPIO gate and a UART gate is this design's choice, needed because the
// activation states 01 and 10 wake different peripherals.
//
// Interface: control inputs come from the selective wake-up unit and are
// synchronous to clk_in. Timing: a domain enable takes effect within one cycle
// of the main clock; a change of sel_slow takes effect within one falling edge
// of each clock (up to one CLKDV period).
module coma_clock_mgmt
  import coma_pkg::*;
#(
  parameter int unsigned CLKDV_DIVIDE = 16
) (
  input  logic    clk_in,     // board clock (50 MHz in the example)
  input  logic    rst,        // asynchronous, active high
  input  logic    sel_slow,   // 1: drive the domains from CLKDV
  input  dom_en_t dom_en,     // per-domain clock enables
  output logic    clk_root,   // ungated CLK0, for the always-on COMA units
  output logic    clk_main,   // multiplexer output, before gating
  output logic    clk_cpu,
  output logic    clk_mem,
  output logic    clk_opb,
  output logic    clk_gpio,
  output logic    clk_uart,
  output logic    locked
);
  logic clkdv;

  coma_dcm #(.CLKDV_DIVIDE(CLKDV_DIVIDE)) u_dcm (
    .clkin(clk_in), .rst(rst), .clk0(clk_root), .clkdv(clkdv), .locked(locked)
  );

  coma_bufgmux u_mux (
    .i0(clk_root), .i1(clkdv), .s(sel_slow), .rst(rst), .o(clk_main)
  );

  coma_bufgce u_ce_cpu  (.i(clk_main), .ce(dom_en.cpu),  .rst(rst), .o(clk_cpu));
  coma_bufgce u_ce_mem  (.i(clk_main), .ce(dom_en.mem),  .rst(rst), .o(clk_mem));
  coma_bufgce u_ce_opb  (.i(clk_main), .ce(dom_en.opb),  .rst(rst), .o(clk_opb));
  coma_bufgce u_ce_gpio (.i(clk_main), .ce(dom_en.gpio), .rst(rst), .o(clk_gpio));
  coma_bufgce u_ce_uart (.i(clk_main), .ce(dom_en.uart), .rst(rst), .o(clk_uart));
endmodule
