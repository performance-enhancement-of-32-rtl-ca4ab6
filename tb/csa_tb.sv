// csa_tb: self-check of the combinational carry select adder.
// Three instances: 32 bits with each full-adder cell, and the 16-bit, 4-bit
// block form. Directed corner operands (all ones, carry rippling through every
// block, the 7FFFFFFF + 7FFFFFFF + 1 example) are followed by random operands.
// Results are compared with integer addition, and the test counts how often a
// block selected its carry-in-1 sum and its carry-in-0 sum.
module csa_tb;
  import csa_pkg::*;

  logic [31:0] a, b, s_ha, s_min;
  logic [15:0] s16;
  logic        cin, c_ha, c_min, c16;
  int          checks = 0, failures = 0;
  int          sel1 = 0, sel0 = 0;

  csa #(.W(32), .BW(4), .FA(FA_HALF_ADDERS)) dut_ha  (.a(a), .b(b), .cin(cin), .s(s_ha),  .cout(c_ha));
  csa #(.W(32), .BW(4), .FA(FA_MINORITY))    dut_min (.a(a), .b(b), .cin(cin), .s(s_min), .cout(c_min));
  csa #(.W(16), .BW(4), .FA(FA_MINORITY))    dut_16  (.a(a[15:0]), .b(b[15:0]), .cin(cin), .s(s16), .cout(c16));

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input logic tc);
    logic [32:0] exp32, carries;
    logic [16:0] exp16;
    a = ta; b = tb_; cin = tc;
    #1;
    exp32 = {1'b0, ta} + {1'b0, tb_} + 33'(tc);
    exp16 = {1'b0, ta[15:0]} + {1'b0, tb_[15:0]} + 17'(tc);
    carries = {1'b0, ta} ^ {1'b0, tb_} ^ exp32;   // carry into each bit
    for (int k = 4; k < 32; k += 4) begin
      if (carries[k]) sel1++;
      else            sel0++;
    end
    checks += 3;
    if ({c_ha, s_ha} !== exp32) begin
      failures++;
      $display("FAIL design1 %h+%h+%0b = %h, expected %h", ta, tb_, tc, {c_ha, s_ha}, exp32);
    end
    if ({c_min, s_min} !== exp32) begin
      failures++;
      $display("FAIL design2 %h+%h+%0b = %h, expected %h", ta, tb_, tc, {c_min, s_min}, exp32);
    end
    if ({c16, s16} !== exp16) begin
      failures++;
      $display("FAIL 16-bit %h+%h+%0b = %h, expected %h", ta[15:0], tb_[15:0], tc, {c16, s16}, exp16);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h7FFF_FFFF, 32'h7FFF_FFFF, 1'b1);
    check(32'hFFFF_FFFF, 32'h0000_0000, 1'b1);
    check(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    check(32'h0000_0000, 32'h0000_0000, 1'b0);
    check(32'h0F0F_0F0F, 32'h00F0_F0F1, 1'b0);
    for (int i = 0; i < 20000; i++) begin
      check($urandom, $urandom, 1'($urandom));
    end
    checks++;
    if (sel1 == 0 || sel0 == 0) begin
      failures++;
      $display("FAIL block carry selection not exercised: sel1=%0d sel0=%0d", sel1, sel0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
