// coma_bufgmux: glitch-free global clock multiplexer (the role of a BUFGMUX).
//
// Output o follows i0 while s = 0 and i1 while s = 1. Each input has a select
// flop clocked on that input's falling edge; a side is enabled only after the
// other side has been disabled, so the output never shows a shortened pulse.
// A switch takes effect after at most one falling edge of the old clock plus
// one falling edge of the new clock; in between the output stays low.
// The reset (own addition, the vendor buffer has none) selects i0.
module coma_bufgmux (
  input  logic i0,
  input  logic i1,
  input  logic s,
  input  logic rst,   // asynchronous, active high
  output logic o
);
  logic q0, q1;

  always_ff @(negedge i0 or posedge rst) begin
    if (rst) q0 <= 1'b1;
    else     q0 <= ~s & ~q1;
  end

  always_ff @(negedge i1 or posedge rst) begin
    if (rst) q1 <= 1'b0;
    else     q1 <= s & ~q0;
  end

  assign o = (i0 & q0) | (i1 & q1);
endmodule
