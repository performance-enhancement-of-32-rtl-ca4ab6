// csa32_reg_tb: self-check of csa32_reg, the plain registered 32-bit carry select adder.
//
// Operands change on the falling clock edge. A reference model in the test
// (two register stages with load enable en, integer addition in
// between) predicts sum and carry out; the DUT is compared with it before every
// new operand set. The 7FFFFFFF + 7FFFFFFF + 1 example is applied first and its
// result is also checked against the constant FFFFFFFF / carry 0, two cycles
// after the edge that took it.
module csa32_reg_tb;
  logic        clk = 1'b0, rst_n = 1'b1, en = 1'b1;
  logic [31:0] a = '0, b = '0, sum;
  logic        cin = 1'b0, cout;
  int          checks = 0, failures = 0, cycles = 0, held = 0;
  int unsigned pick;

  // Reference model.
  logic [31:0] m_a = '0, m_b = '0;
  logic        m_cin = 1'b0;
  logic [32:0] m_out = '0;

  csa32_reg dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles++;
    if (rst_n) begin
      m_out <= {1'b0, m_a} + {1'b0, m_b} + 33'(m_cin);
      if (en) begin
        m_a   <= a;
        m_b   <= b;
        m_cin <= cin;
      end else begin
        held++;
      end
    end
  end

  task automatic compare(input string what);
    checks++;
    if ({cout, sum} !== m_out) begin
      failures++;
      $display("FAIL %s at cycle %0d: got %0b_%h, expected %0b_%h", what, cycles, cout, sum, m_out[32], m_out[31:0]);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;   // a real falling edge for the asynchronous reset
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Example from the evaluation: A = B = 7FFFFFFF, cin = 1.
    @(negedge clk);
    a = 32'h7FFF_FFFF; b = 32'h7FFF_FFFF; cin = 1'b1; en = 1'b1;
    @(negedge clk);   // taken into the operand registers
    a = '0; b = '0; cin = 1'b0;
    @(negedge clk);   // result registered
    checks++;
    if (sum !== 32'hFFFF_FFFF || cout !== 1'b0) begin
      failures++;
      $display("FAIL example: got %0b_%h, expected 0_ffffffff", cout, sum);
    end
    compare("example");
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      compare("random");
      pick = $urandom_range(0, 7);
      case (pick)
        0:       begin a = 32'hFFFF_FFFF; b = $urandom; end
        1:       begin a = $urandom; b = ~a; end
        2:       ;  // same operands again
        default: begin a = $urandom; b = $urandom; end
      endcase
      if (pick != 2) cin = 1'($urandom);
      en = 1'b1;
    end
    repeat (3) begin
      @(negedge clk);
      compare("drain");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
