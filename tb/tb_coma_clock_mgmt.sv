// tb_coma_clock_mgmt: checks the clock management unit. For random domain
// enables and clock selections it counts the rising edges of every gated
// clock over a window of 64 input cycles (after letting the change settle) and
// compares with the expected count: 64 for a running CLK0 domain, 4 for a
// running CLKDV domain (divide by 16), 0 for a gated one. It also checks that
// a domain gated or ungated on CLK0 follows within two input cycles.
module tb_coma_clock_mgmt;
  import coma_pkg::*;
  logic    clk_in = 1'b0, rst = 1'b0, sel_slow = 1'b0;
  dom_en_t dom_en = '1;
  logic    clk_root, clk_main, clk_cpu, clk_mem, clk_opb, clk_gpio, clk_uart, locked;
  int checks = 0, failures = 0;
  int n [5];

  coma_clock_mgmt #(.CLKDV_DIVIDE(16)) dut (.*);

  always #10 clk_in = ~clk_in;
  always @(posedge clk_cpu)  n[4]++;
  always @(posedge clk_mem)  n[3]++;
  always @(posedge clk_opb)  n[2]++;
  always @(posedge clk_gpio) n[1]++;
  always @(posedge clk_uart) n[0]++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", msg, $time); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst = 1'b1;
    #30 rst = 1'b0;
    wait (locked);
    repeat (60) begin
      dom_en_t e;
      bit      slow;
      int      exp_n;
      e    = dom_en_t'($urandom);
      slow = 1'($urandom);
      @(posedge clk_root); #1 dom_en = e; sel_slow = slow;
      repeat (40) @(posedge clk_root);
      #1;
      foreach (n[k]) n[k] = 0;
      repeat (64) @(posedge clk_root);
      #1;
      exp_n = slow ? 4 : 64;
      for (int k = 0; k < 5; k++)
        check(n[k] == (e[k] ? exp_n : 0),
              $sformatf("domain %0d en=%0d slow=%0d edges=%0d", k, e[k], slow, n[k]));
    end
    // gating latency on CLK0
    @(posedge clk_root); #1 sel_slow = 1'b0; dom_en = '1;
    repeat (40) @(posedge clk_root);
    repeat (10) begin
      int n_before;
      @(posedge clk_root); #1 dom_en.cpu = 1'b0; n_before = n[4];
      repeat (2) @(posedge clk_root); #1 n_before = n[4];
      repeat (5) @(posedge clk_root); #1;
      check(n[4] == n_before, "cpu clock not stopped within two cycles");
      dom_en.cpu = 1'b1; n_before = n[4];
      repeat (2) @(posedge clk_root); #1;
      check(n[4] - n_before >= 1, "cpu clock not restarted within two cycles");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
