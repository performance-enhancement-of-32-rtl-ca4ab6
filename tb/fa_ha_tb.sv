// fa_ha_tb: exhaustive self-check of the fa_ha full adder.
// All eight input combinations are applied; sum and carry out are compared
// with the two-bit result of adding the three inputs as integers.
module fa_ha_tb;
  logic a, b, cin, s, cout;
  int   checks = 0, failures = 0;

  fa_ha dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [1:0] exp_sum;
      {a, b, cin} = 3'(v);
      #1;
      exp_sum = 2'(int'(a) + int'(b) + int'(cin));
      checks++;
      if ({cout, s} !== exp_sum) begin
        failures++;
        $display("FAIL a=%0b b=%0b cin=%0b -> cout=%0b s=%0b, expected %b",
                 a, b, cin, cout, s, exp_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
