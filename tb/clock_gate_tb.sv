// clock_gate_tb: self-check of the latch-based clock gate.
//
// clk has a 10-unit period with rising edges at 5, 15, ... The enable is
// changed at random both while clk is low (2 units after a falling edge) and
// while clk is high (2 units after a rising edge). Expected behaviour: during
// each high phase gclk follows clk if en was 1 at the rising edge and stays 0
// otherwise, whatever en does during that phase; during each low phase gclk is
// 0; and gclk never rises except together with clk.
module clock_gate_tb;
  logic clk = 1'b0, en = 1'b0, gclk;
  int   checks = 0, failures = 0;
  int   passed = 0, blocked = 0, high_changes = 0;

  clock_gate dut (.clk(clk), .en(en), .gclk(gclk));

  always #5 clk = ~clk;

  initial begin : watchdog
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Enable changes at times 10k+2 (clk low) and 10k+7 (clk high).
  initial begin
    forever begin
      #2 en = 1'($urandom);
      #5 begin
        logic nxt;
        nxt = 1'($urandom);
        if (nxt != en) high_changes++;
        en = nxt;
      end
      #3;
    end
  end

  // Every rising edge of gclk must coincide with a rising edge of clk.
  always @(posedge gclk) begin
    checks++;
    if ($time % 10 != 5) begin
      failures++;
      $display("FAIL gclk rose at %0t, not on a clk edge", $time);
    end
  end

  initial begin
    repeat (2000) begin
      logic exp;
      @(posedge clk);
      exp = en;
      if (exp) passed++;
      else     blocked++;
      #1;
      checks++;
      if (gclk !== exp) begin
        failures++;
        $display("FAIL at %0t: gclk=%0b expected %0b", $time, gclk, exp);
      end
      #3;   // after the mid-phase en change
      checks++;
      if (gclk !== exp) begin
        failures++;
        $display("FAIL at %0t: gclk=%0b expected %0b (en changed while clk high)", $time, gclk, exp);
      end
      #2;   // clk low
      checks++;
      if (gclk !== 1'b0) begin
        failures++;
        $display("FAIL at %0t: gclk high while clk low", $time);
      end
    end
    checks++;
    if (passed == 0 || blocked == 0 || high_changes == 0) begin
      failures++;
      $display("FAIL coverage: passed=%0d blocked=%0d high_changes=%0d", passed, blocked, high_changes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
