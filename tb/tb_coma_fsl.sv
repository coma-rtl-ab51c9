// tb_coma_fsl: checks the one-word FSL link in three clock relations (same
// clock, slow master, slow slave). 200 random words are sent with random
// gaps; each must arrive once, unchanged and in order. With equal clocks the
// word must be visible on s_exists by the second slave edge after the write.
module tb_coma_fsl;
  logic        rst = 1'b0;
  logic        base = 1'b0, slow = 1'b0;
  logic        m_clk, s_clk;
  logic [31:0] m_data, s_data;
  logic        m_write = 1'b0, m_full, s_exists, s_read = 1'b0;
  int          mode = 0;
  int checks = 0, failures = 0;
  logic [31:0] q [$];

  coma_fsl #(.WIDTH(32)) dut (.*);

  always #5 base = ~base;
  always #40 slow = ~slow;
  assign m_clk = (mode == 1) ? slow : base;
  assign s_clk = (mode == 2) ? slow : base;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", msg, $time); end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // slave: pops words with random back-pressure
  always @(posedge s_clk) begin
    s_read <= 1'b0;
    if (s_exists && !s_read && ($urandom % 3 != 0)) begin
      s_read <= 1'b1;
      check(q.size() > 0, "word received that was not sent");
      if (q.size() > 0) begin
        logic [31:0] w;
        w = q.pop_front();
        check(s_data == w, $sformatf("got %h expected %h", s_data, w));
      end
    end
  end

  initial begin
    #1 rst = 1'b1;
    #20 rst = 1'b0;
    for (mode = 0; mode < 3; mode++) begin
      repeat (200) begin
        logic [31:0] w;
        @(posedge m_clk);
        while (m_full) @(posedge m_clk);
        w        = $urandom;
        m_data  <= w;
        m_write <= 1'b1;
        q.push_back(w);
        @(posedge m_clk);
        m_write <= 1'b0;
        if (mode == 0) begin
          // the write was taken on the edge just passed; two more slave edges
          repeat (2) @(posedge s_clk);
          #1;
          check(s_exists || q.size() == 0, "word not visible after two edges");
        end
        repeat ($urandom % 4) @(posedge m_clk);
      end
      while (q.size() > 0) @(posedge base);
      repeat (20) @(posedge slow);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
