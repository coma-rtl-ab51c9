// coma_tick_timer: dedicated OS clock-tick timer with routing to ATIM or processor.
//
// A free-running counter on the always-on clock produces one tick every PERIOD
// cycles. While the processor is awake (cpu_awake = 1) the tick is delivered
// to it as a level interrupt, tick_irq, held until the processor's tick
// handler pulses cpu_ack on the processor clock; the acknowledge crosses back
// as a toggle through a two-flop synchroniser. While the processor is clock
// gated the tick is handed to the ATIM task manager instead, as a one-cycle
// pulse on tick_atim. Ticks do not pass through the OPB bus, so the bus and
// its controller stay asleep for them.
// PERIOD defaults to 500000 cycles, a 100 Hz tick at 50 MHz (own choice).
module coma_tick_timer #(
  parameter int unsigned PERIOD = 500000
) (
  input  logic clk,        // always-on clock
  input  logic rst,        // asynchronous, active high
  input  logic cpu_awake,  // processor clock running
  output logic tick,       // one-cycle pulse at every tick
  output logic tick_atim,  // tick handled by the ATIM
  output logic tick_irq,   // tick interrupt to the processor (level)
  input  logic cpu_clk,
  input  logic cpu_ack     // one cpu_clk cycle: tick interrupt handled
);
  localparam int unsigned CW = $clog2(PERIOD + 1);

  logic [CW-1:0] cnt;
  logic          ack_tgl;
  logic [2:0]    ack_sync;
  logic          ack_pulse;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) cnt <= '0;
    else if (cnt == CW'(PERIOD - 1)) cnt <= '0;
    else cnt <= cnt + 1'b1;
  end
  assign tick      = (cnt == CW'(PERIOD - 1));
  assign tick_atim = tick && !cpu_awake;

  always_ff @(posedge cpu_clk or posedge rst) begin
    if (rst) ack_tgl <= 1'b0;
    else if (cpu_ack) ack_tgl <= ~ack_tgl;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) ack_sync <= '0;
    else     ack_sync <= {ack_sync[1:0], ack_tgl};
  end
  assign ack_pulse = ack_sync[2] ^ ack_sync[1];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) tick_irq <= 1'b0;
    else if (tick && cpu_awake) tick_irq <= 1'b1;
    else if (ack_pulse) tick_irq <= 1'b0;
  end
endmodule
