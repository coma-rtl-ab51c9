// tb_coma_irq_mgr: checks the interrupt management unit with two sources,
// GPIO (state 01, address 0x40000000) and UART (state 10, 0x40600000).
//  * With everything gated, a GPIO interrupt must raise wake_req in state 01
//    within four cycles and must not notify the processor; hold must suppress
//    wake_req.
//  * Once processor and OPB run, wake_req must drop and cpu_irq must rise; OPB
//    reads must return the source address and the pending mask; an OPB write
//    to the acknowledge register must clear the source and cpu_irq.
//  * With processor and OPB running a new interrupt must not request a wake
//    (the wake-up is skipped), unless the source's own domain is gated.
//  * Both sources pending while asleep: wake state 11 and the GPIO address
//    (lower number) reported first.
module tb_coma_irq_mgr;
  import coma_pkg::*;
  logic        clk = 1'b0, opb_clk = 1'b0, rst = 1'b0;
  logic [1:0]  ext_irq = '0;
  dom_en_t     dom_en = '0;
  logic        hold = 1'b0;
  logic        wake_req, cpu_irq, pending_any;
  act_state_t  wake_state;
  logic        opb_select = 1'b0, opb_rnw = 1'b0, sl_xferack;
  logic [31:0] opb_abus = '0, opb_dbus = '0, sl_dbus;
  int checks = 0, failures = 0;

  coma_irq_mgr #(
    .N_IRQ(2), .IRQ_STATE({ACT_UART, ACT_GPIO}),
    .SRC_ADDR({32'h4060_0000, 32'h4000_0000}), .OPB_BASE(32'h4120_0000)
  ) dut (.*);

  always #5 clk = ~clk;
  always #5 opb_clk = ~opb_clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", msg, $time); end
  endtask

  task automatic opb_read(input logic [31:0] a, output logic [31:0] d);
    int w = 0;
    @(posedge opb_clk); #1 opb_select = 1'b1; opb_rnw = 1'b1; opb_abus = a;
    do begin @(posedge opb_clk); #1 w++; end while (!sl_xferack && w < 8);
    check(sl_xferack && w == 1, "OPB read not acknowledged in one cycle");
    d = sl_dbus;
    opb_select = 1'b0; opb_abus = '0;
    @(posedge opb_clk); #1 check(!sl_xferack && sl_dbus == '0, "OPB data bus not released");
  endtask

  task automatic opb_write(input logic [31:0] a, input logic [31:0] d);
    int w = 0;
    @(posedge opb_clk); #1 opb_select = 1'b1; opb_rnw = 1'b0; opb_abus = a; opb_dbus = d;
    do begin @(posedge opb_clk); #1 w++; end while (!sl_xferack && w < 8);
    check(sl_xferack, "OPB write not acknowledged");
    opb_select = 1'b0; opb_abus = '0; opb_dbus = '0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    #1 rst = 1'b1;
    #12 rst = 1'b0;
    repeat (3) @(posedge clk);
    check(!wake_req && !cpu_irq && !pending_any, "idle after reset");
    // GPIO interrupt while asleep
    #1 ext_irq[0] = 1'b1;
    repeat (4) @(posedge clk);
    #1 check(wake_req && wake_state == ACT_GPIO, "wake request in state 01");
    check(!cpu_irq, "processor notified while gated");
    hold = 1'b1; #1 check(!wake_req, "hold ignored");
    hold = 1'b0;
    // the wake-up unit grants state 01
    @(posedge clk); #1 dom_en = state_domains(ACT_GPIO);
    #1 check(!wake_req && cpu_irq, "notify after wake");
    repeat (3) @(posedge opb_clk);
    opb_read(32'h4120_0000, d); check(d == 32'h4000_0000, $sformatf("source address %h", d));
    opb_read(32'h4120_0004, d); check(d == 32'h1, "pending mask");
    opb_write(32'h4120_0008, 32'h1);
    repeat (6) @(posedge clk);
    #1 check(!cpu_irq && !pending_any, "acknowledge did not clear");
    ext_irq[0] = 1'b0;
    // interrupt while processor and OPB already run: no wake-up
    repeat (2) @(posedge clk);
    #1 ext_irq[0] = 1'b1;
    repeat (5) @(posedge clk);
    #1 check(!wake_req && cpu_irq, "wake-up not skipped when active");
    opb_write(32'h4120_0008, 32'h1);
    repeat (6) @(posedge clk);
    ext_irq[0] = 1'b0;
    // UART interrupt in state 01: UART domain gated, so a wake-up is needed
    #1 ext_irq[1] = 1'b1;
    repeat (5) @(posedge clk);
    #1 check(wake_req && wake_state == ACT_UART, "UART domain not requested");
    opb_write(32'h4120_0008, 32'h2);
    repeat (6) @(posedge clk);
    ext_irq[1] = 1'b0;
    // both while asleep
    dom_en = '0;
    #1 ext_irq = 2'b11;
    repeat (5) @(posedge clk);
    #1 check(wake_req && wake_state == ACT_ALL, "union of states");
    dom_en = state_domains(ACT_ALL);
    repeat (3) @(posedge opb_clk);
    opb_read(32'h4120_0000, d); check(d == 32'h4000_0000, "priority order");
    opb_write(32'h4120_0008, 32'h1);
    repeat (8) @(posedge clk);
    opb_read(32'h4120_0000, d); check(d == 32'h4060_0000, "second source address");
    opb_write(32'h4120_0008, 32'h2);
    repeat (8) @(posedge clk);
    #1 check(!pending_any && !cpu_irq, "all cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
