// coma_bufgce: global clock buffer with enable (the role of a BUFGCE): a clock gate.
//
// The enable is sampled on the falling edge of the clock and the output is the
// clock ANDed with that sample, so a change of ce can never cut a high pulse
// short. An enable raised before a falling edge lets the next rising edge
// through: the gate opens or closes within one clock cycle.
module coma_bufgce (
  input  logic i,
  input  logic ce,
  input  logic rst,   // asynchronous, active high; opens the gate
  output logic o
);
  logic en_q;

  always_ff @(negedge i or posedge rst) begin
    if (rst) en_q <= 1'b1;
    else     en_q <= ce;
  end

  assign o = i & en_q;
endmodule
