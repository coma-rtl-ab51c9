// tb_coma_bufgce: checks the clock gate. With ce low no rising edge may pass,
// with ce high every one passes, a change of ce made just after a rising edge
// applies from the next rising edge on, and no output pulse is ever shorter
// than a full input high phase.
module tb_coma_bufgce;
  logic i = 1'b0, ce = 1'b1, rst = 1'b0, o;
  int checks = 0, failures = 0;
  int n_o = 0;
  realtime t_orise;

  coma_bufgce dut (.*);

  always #5 i = ~i;
  always @(posedge o) begin n_o++; t_orise = $realtime; end
  always @(negedge o) if ($realtime > 1) begin
    checks++;
    if ($realtime - t_orise < 4.9) begin failures++; $display("FAIL: short pulse at %0t", $time); end
  end

  initial begin
    repeat (1000) @(posedge i);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    #1 rst = 1'b1;
    #11 rst = 1'b0;
    repeat (50) begin
      int len;
      bit en;
      en  = 1'($urandom);
      len = 1 + int'($urandom % 8);
      @(posedge i); #1 ce = en;
      n = n_o;
      repeat (len) @(posedge i);
      #1;
      checks++;
      if (n_o - n != (en ? len : 0)) begin
        failures++;
        $display("FAIL: ce=%0d len=%0d edges=%0d", en, len, n_o - n);
      end
    end
    // change ce in the middle of the low phase: still clean
    @(negedge i); #2 ce = 1'b0;
    @(negedge i); #2 ce = 1'b1;
    repeat (3) @(posedge i);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
