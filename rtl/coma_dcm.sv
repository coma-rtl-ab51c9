// coma_dcm: behavioural model of the FPGA's digital clock manager (DCM).
//
// This is a model of a vendor clock primitive, not logic to be synthesised:
// on the FPGA the DCM primitive is instantiated in its place. It gives the two
// outputs the clock management unit uses: CLK0, a copy of the input clock, and
// CLKDV, the input clock divided by CLKDV_DIVIDE (16 in the example system, so
// 50 MHz becomes 3.125 MHz; a divider of 8 gives 6.25 MHz).
//
// Model details (own choices): CLKDV is produced by a counter on the falling
// edge of the input, so its edges sit half an input period after those of CLK0.
// That keeps every path between the CLK0 and CLKDV domains free of simulation
// races. LOCKED rises CLKDV_DIVIDE input cycles after reset is released.
module coma_dcm #(
  parameter int unsigned CLKDV_DIVIDE = 16   // even, >= 2
) (
  input  logic clkin,
  input  logic rst,      // asynchronous, active high
  output logic clk0,
  output logic clkdv,
  output logic locked
);
  localparam int unsigned HALF = CLKDV_DIVIDE / 2;
  localparam int unsigned CW   = $clog2(CLKDV_DIVIDE + 1);

  logic [CW-1:0] cnt;
  logic [CW-1:0] lock_cnt;

  assign clk0 = clkin;

  always_ff @(negedge clkin or posedge rst) begin
    if (rst) begin
      cnt   <= '0;
      clkdv <= 1'b0;
    end else if (cnt == CW'(HALF - 1)) begin
      cnt   <= '0;
      clkdv <= ~clkdv;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  always_ff @(posedge clkin or posedge rst) begin
    if (rst) lock_cnt <= '0;
    else if (lock_cnt != CW'(CLKDV_DIVIDE)) lock_cnt <= lock_cnt + 1'b1;
  end
  assign locked = (lock_cnt == CW'(CLKDV_DIVIDE));
endmodule
