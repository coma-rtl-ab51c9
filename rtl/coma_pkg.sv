// coma_pkg: types and constants shared by the COMA energy-management blocks.
//
// Activation states ("priority aliasing"): the two most significant bits of an
// 8-bit task priority select which clock domains run while that task executes.
// The four states and their clock domains follow the example system:
//   00  processor + memory controllers                       (CLK0)
//   01  processor + memory controllers + OPB + GPIO          (CLK0)
//   10  processor + memory controllers + OPB + UART          (CLKDV, 1/16 rate)
//   11  everything                                           (CLK0)
// Bits [5:3] of the priority are the ready-table row (Y), bits [2:0] the column
// (X), as in the MicroC/OS-II ready list.
//
// Memory map of the operating-system variables in the shared dual-port BRAM
// (word addresses, one 8- or 16-bit variable per 32-bit word, value in the low
// bits). The addresses are this design's choice; the software places the
// variables there. A task control block (TCB) occupies four consecutive words:
// next pointer, previous pointer, OSTCBDly, OSTCBPrio. A null pointer is 0.
package coma_pkg;

  typedef enum logic [1:0] {
    ACT_MEM  = 2'b00,
    ACT_GPIO = 2'b01,
    ACT_UART = 2'b10,
    ACT_ALL  = 2'b11
  } act_state_t;

  // One enable per gated clock domain.
  typedef struct packed {
    logic cpu;   // MicroBlaze and the FSLs attached to it
    logic mem;   // the two LMB BRAM interface controllers (BRAM port A)
    logic opb;   // OPB bus controller
    logic gpio;  // opb_gpio peripheral
    logic uart;  // opb_uartlite peripheral
  } dom_en_t;

  localparam int unsigned DW = 32;                  // MicroBlaze data width

  localparam int unsigned IDLE_PRIO      = 63;      // MicroC/OS-II idle task
  localparam int unsigned ADDR_RDYGRP    = 16;      // OSRdyGrp
  localparam int unsigned ADDR_RDYTBL    = 17;      // OSRdyTbl[0..7]
  localparam int unsigned ADDR_TCBLIST   = 25;      // OSTCBList (head pointer)
  localparam int unsigned ADDR_OSTIME    = 26;      // 8-bit tick counter
  localparam int unsigned TCB_NEXT       = 0;       // OSTCBNext
  localparam int unsigned TCB_PREV       = 1;       // OSTCBPrev
  localparam int unsigned TCB_DLY        = 2;       // OSTCBDly (16 bits)
  localparam int unsigned TCB_PRIO       = 3;       // OSTCBPrio (8 bits)

  // Clock domains that run in each activation state.
  function automatic dom_en_t state_domains(act_state_t s);
    dom_en_t d;
    d.cpu  = 1'b1;
    d.mem  = 1'b1;
    d.opb  = (s != ACT_MEM);
    d.gpio = (s == ACT_GPIO) || (s == ACT_ALL);
    d.uart = (s == ACT_UART) || (s == ACT_ALL);
    return d;
  endfunction

  // State 10 runs the device from CLKDV, all others from CLK0.
  function automatic logic state_slow(act_state_t s);
    return s == ACT_UART;
  endfunction

endpackage
