// tb_coma_dcm: checks the DCM model. CLK0 must copy the input clock, CLKDV
// must have a period of exactly CLKDV_DIVIDE input periods with a 50% duty
// cycle, and LOCKED must rise CLKDV_DIVIDE input cycles after reset.
module tb_coma_dcm;
  logic clkin = 1'b0, rst = 1'b0;
  logic clk0, clkdv, locked;
  int checks = 0, failures = 0;
  int cyc = 0;

  coma_dcm #(.CLKDV_DIVIDE(16)) dut (.*);

  always #5 clkin = ~clkin;
  always @(posedge clkin) cyc++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2000) @(posedge clkin);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c0, t_rise, t_prev, t_fall;
    #1 rst = 1'b1;
    #22 rst = 1'b0;
    @(posedge clkin); c0 = cyc;
    wait (locked);
    check(cyc - c0 == 16 || cyc - c0 == 15, $sformatf("locked after %0d cycles", cyc - c0));
    // CLK0 follows the input
    repeat (20) begin
      @(negedge clkin); #1 check(clk0 == clkin, "clk0 low");
      @(posedge clkin); #1 check(clk0 == clkin, "clk0 high");
    end
    // CLKDV period and duty
    @(posedge clkdv); t_prev = $time;
    repeat (8) begin
      @(negedge clkdv); t_fall = $time;
      @(posedge clkdv); t_rise = $time;
      check(t_rise - t_prev == 160, $sformatf("clkdv period %0d ns", t_rise - t_prev));
      check(t_fall - t_prev == 80, $sformatf("clkdv high time %0d ns", t_fall - t_prev));
      t_prev = t_rise;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
