// rca_tb: exhaustive self-check of the 4-bit ripple carry adder, built once
// from each full-adder cell. Every pair of 4-bit operands with both carry-in
// values is applied; the 5-bit result is compared with integer addition.
module rca_tb;
  import csa_pkg::*;

  localparam int W = 4;

  logic [W-1:0] a, b, s1, s2;
  logic         cin, c1, c2;
  int           checks = 0, failures = 0;

  rca #(.W(W), .FA(FA_HALF_ADDERS)) dut_ha  (.a(a), .b(b), .cin(cin), .s(s1), .cout(c1));
  rca #(.W(W), .FA(FA_MINORITY))    dut_min (.a(a), .b(b), .cin(cin), .s(s2), .cout(c2));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2*W+1)); v++) begin
      logic [W:0] exp_sum;
      {cin, b, a} = (2*W+1)'(v);
      #1;
      exp_sum = (W+1)'(int'(a) + int'(b) + int'(cin));
      checks += 2;
      if ({c1, s1} !== exp_sum) begin
        failures++;
        $display("FAIL design1 %h+%h+%0b = %h, expected %h", a, b, cin, {c1, s1}, exp_sum);
      end
      if ({c2, s2} !== exp_sum) begin
        failures++;
        $display("FAIL design2 %h+%h+%0b = %h, expected %h", a, b, cin, {c2, s2}, exp_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
