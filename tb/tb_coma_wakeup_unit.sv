// tb_coma_wakeup_unit: checks the selective wake-up unit against the table of
// activation states (00: processor and memory; 01: + OPB and GPIO; 10: + OPB
// and UART at CLKDV; 11: everything), written out here independently of the
// package function. Random sequences of sleep, tick-wake, interrupt-wake and
// FSL requests are applied one per cycle and the registered outputs are
// compared with a reference model on the next cycle.
module tb_coma_wakeup_unit;
  import coma_pkg::*;
  logic        clk = 1'b0, rst = 1'b0;
  logic        sleep_req = 1'b0, tick_wake = 1'b0, irq_wake = 1'b0, fsl_exists = 1'b0;
  act_state_t  tick_state = ACT_MEM, irq_state = ACT_MEM, state;
  logic [31:0] fsl_data = '0;
  logic        fsl_read, awake, sel_slow;
  dom_en_t     dom_en;
  int checks = 0, failures = 0;
  int n_sleep = 0, n_tick = 0, n_irq = 0, n_fsl = 0;

  coma_wakeup_unit dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", msg, $time); end
  endtask

  // cpu, mem, opb, gpio, uart
  function automatic logic [4:0] table_en(logic [1:0] s);
    case (s)
      2'b00:   return 5'b11000;
      2'b01:   return 5'b11110;
      2'b10:   return 5'b11101;
      default: return 5'b11111;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic       m_awake;
    logic [1:0] m_state;
    #1 rst = 1'b1;
    #12 rst = 1'b0;
    m_awake = 1'b1; m_state = 2'b11;
    check(awake && state == ACT_ALL && dom_en == 5'b11111, "reset state");
    repeat (2000) begin
      @(posedge clk); #1;
      sleep_req  = ($urandom % 4 == 0);
      tick_wake  = ($urandom % 8 == 0);
      tick_state = act_state_t'($urandom);
      irq_wake   = ($urandom % 8 == 0);
      irq_state  = act_state_t'($urandom);
      fsl_exists = ($urandom % 5 == 0);
      fsl_data   = $urandom;
      check(fsl_read == fsl_exists, "fsl_read");
      if (tick_wake) begin
        m_awake = 1'b1; m_state = tick_state; n_tick++;
      end else if (irq_wake) begin
        m_state = m_awake ? (m_state | irq_state) : irq_state;
        m_awake = 1'b1; n_irq++;
      end else if (fsl_exists) begin
        m_state = fsl_data[7:6]; n_fsl++;
      end else if (sleep_req) begin
        m_awake = 1'b0; n_sleep++;
      end
      @(posedge clk); #1;
      sleep_req = 1'b0; tick_wake = 1'b0; irq_wake = 1'b0; fsl_exists = 1'b0;
      check(awake == m_awake, "awake");
      check(state == act_state_t'(m_state), $sformatf("state %b exp %b", state, m_state));
      check(dom_en == (m_awake ? table_en(m_state) : 5'b0),
            $sformatf("dom_en %b state %b awake %b", dom_en, m_state, m_awake));
      check(sel_slow == (m_state == 2'b10), "sel_slow");
    end
    check(n_sleep > 10 && n_tick > 10 && n_irq > 10 && n_fsl > 10, "request mix");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
