// tb_coma_dpbram: checks the dual-port RAM against a reference array. Port A
// (with random byte enables) and port B (word writes) run on different clocks
// and work on disjoint halves of a 64-word RAM with random reads and writes;
// every read must return the reference word one cycle later. The RAM must
// start at zero.
module tb_coma_dpbram;
  localparam int AW = 6;
  logic          clka = 1'b0, clkb = 1'b0;
  logic          ena = 1'b0, enb = 1'b0, web = 1'b0;
  logic [3:0]    wea = '0;
  logic [AW-1:0] addra = '0, addrb = '0;
  logic [31:0]   dina = '0, dinb = '0, douta, doutb;
  logic [31:0]   ref_mem [2**AW];
  int checks = 0, failures = 0;

  coma_dpbram #(.AW(AW), .DW(32)) dut (.*);

  always #5 clka = ~clka;
  always #7 clkb = ~clkb;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", msg, $time); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial foreach (ref_mem[i]) ref_mem[i] = '0;

  // port A: lower half
  initial begin : pa
    logic [31:0] expv;
    repeat (400) begin
      @(posedge clka);
      ena   <= 1'b1;
      wea   <= 4'($urandom);
      addra <= AW'($urandom % (2**(AW-1)));
      dina  <= $urandom;
      @(posedge clka);
      expv = ref_mem[addra];
      for (int b = 0; b < 4; b++) if (wea[b]) ref_mem[addra][8*b +: 8] = dina[8*b +: 8];
      ena <= 1'b0; wea <= '0;
      #1 check(douta == expv, $sformatf("port A read %h exp %h", douta, expv));
    end
  end

  // port B: upper half
  initial begin : pb
    logic [31:0] expv;
    repeat (300) begin
      @(posedge clkb);
      enb   <= 1'b1;
      web   <= 1'($urandom);
      addrb <= AW'(2**(AW-1) + $urandom % (2**(AW-1)));
      dinb  <= $urandom;
      @(posedge clkb);
      expv = ref_mem[addrb];
      if (web) ref_mem[addrb] = dinb;
      enb <= 1'b0; web <= 1'b0;
      #1 check(doutb == expv, $sformatf("port B read %h exp %h", doutb, expv));
    end
  end

  initial begin
    #60000;
    // cross-port reads of the upper half through port A
    for (int i = 2**(AW-1); i < 2**AW; i++) begin
      @(posedge clka);
      ena <= 1'b1; wea <= '0; addra <= AW'(i);
      @(posedge clka);
      ena <= 1'b0;
      #1 check(douta == ref_mem[i], $sformatf("cross read %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
