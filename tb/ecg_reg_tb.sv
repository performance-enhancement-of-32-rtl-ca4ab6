// ecg_reg_tb: self-check of the register with enhanced clock gating (8 bits).
//
// d and en change on the falling clock edge; about a third of the time d is
// left equal to the stored value. A reference register with load enable
// predicts q. The gated clock inside the register is also watched: it must
// pulse exactly on the edges where en is 1 and d differs from q, so a clock
// edge is suppressed both for en low and for unchanged data.
module ecg_reg_tb;
  localparam int W = 8;

  logic         clk = 1'b0, rst_n = 1'b1, en = 1'b0;
  logic [W-1:0] d = '0, q, m_q = '0;
  int           checks = 0, failures = 0;
  int           pulses = 0, skip_en = 0, skip_same = 0;

  ecg_reg #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;   // a real falling edge for the asynchronous reset
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      logic exp_pulse;
      @(negedge clk);
      checks++;
      if (q !== m_q) begin
        failures++;
        $display("FAIL cycle %0d: q=%h expected %h", i, q, m_q);
      end
      en = ($urandom_range(0, 3) != 0);
      if ($urandom_range(0, 2) != 0) d = W'($urandom);
      else                           d = m_q;
      @(posedge clk);
      exp_pulse = en && (d != m_q);
      if (exp_pulse) begin
        m_q = d;
        pulses++;
      end else if (!en) begin
        skip_en++;
      end else begin
        skip_same++;
      end
      #1;
      checks++;
      if (dut.gclk !== exp_pulse) begin
        failures++;
        $display("FAIL cycle %0d: gated clock=%0b expected %0b", i, dut.gclk, exp_pulse);
      end
    end
    checks++;
    if (pulses == 0 || skip_en == 0 || skip_same == 0) begin
      failures++;
      $display("FAIL coverage: pulses=%0d skip_en=%0d skip_same=%0d", pulses, skip_en, skip_same);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
