// coma_dpbram: true dual-port block RAM holding the OS variables.
//
// Port A is the data-side LMB port of the processor (byte write enables, clock
// gated with the memory controllers); port B belongs to the ATIM unit and runs
// from the always-on clock. Both ports are synchronous with one cycle of read
// latency and return the old word on a write (read-first). The contents start
// at zero. The depth (2048 words, 8 KB) is this design's choice.
// The array is written from two clock domains, one per port; lint tools report
// it as driven from two processes. That is what a true dual-port block RAM is,
// and FPGA synthesis maps it to one. Simultaneous writes to one word from both
// ports leave that word undefined, as in the FPGA primitive; the processor and
// the ATIM never write at the same time (the ATIM writes only while the
// processor is gated off).
module coma_dpbram #(
  parameter int unsigned AW = 11,
  parameter int unsigned DW = 32
) (
  input  logic            clka,
  input  logic            ena,
  input  logic [DW/8-1:0] wea,
  input  logic [AW-1:0]   addra,
  input  logic [DW-1:0]   dina,
  output logic [DW-1:0]   douta,
  input  logic            clkb,
  input  logic            enb,
  input  logic            web,
  input  logic [AW-1:0]   addrb,
  input  logic [DW-1:0]   dinb,
  output logic [DW-1:0]   doutb
);
  logic [DW-1:0] mem [2**AW];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
  end

  always_ff @(posedge clka) begin
    if (ena) begin
      douta <= mem[addra];
      for (int b = 0; b < DW/8; b++)
        if (wea[b]) mem[addra][8*b +: 8] <= dina[8*b +: 8];
    end
  end

  always_ff @(posedge clkb) begin
    if (enb) begin
      doutb <= mem[addrb];
      if (web) mem[addrb] <= dinb;
    end
  end
endmodule
