// tb_coma_bufgmux: checks the glitch-free clock multiplexer between a 100 MHz
// and a 6.25 MHz clock. Before and after each switch the output must equal the
// selected input; during a switch every output high and low phase must be at
// least as long as the fast clock's; a switch must finish within one falling
// edge of each clock.
module tb_coma_bufgmux;
  logic i0 = 1'b0, i1 = 1'b0, s = 1'b0, rst = 1'b0, o;
  int checks = 0, failures = 0;
  realtime t_last = 0;

  coma_bufgmux dut (.*);

  always #5  i0 = ~i0;
  always #80 i1 = ~i1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", msg, $time); end
  endtask

  // no phase shorter than the fast clock's; no high phase longer than the
  // slow clock's (which would mean both inputs were passed at once)
  always @(o) begin
    if ($realtime > 20) begin
      check($realtime - t_last >= 4.9, "short phase on o");
      if (o == 1'b0) check($realtime - t_last <= 80.1, "merged high phase on o");
    end
    t_last = $realtime;
  end

  initial begin
    #400000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic follow(input bit sel, input int n);
    repeat (n) begin
      #3;
      check(o == (sel ? i1 : i0), $sformatf("o does not follow i%0d", sel));
    end
  endtask

  initial begin
    #1 rst = 1'b1;
    #12 rst = 1'b0;
    #0.5;                      // sample between clock edges
    follow(1'b0, 100);
    repeat (60) begin
      s = 1'b1;
      #350;                     // one fall of i0 and at most two of i1
      follow(1'b1, 200);
      s = 1'b0;
      #180;
      follow(1'b0, 100);
      #($urandom % 160);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
