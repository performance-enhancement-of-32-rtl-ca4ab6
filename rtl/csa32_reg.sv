// csa32_reg: registered 32-bit carry select adder (the plain, ungated
// reference version).
//
// Registers on the operands A and B (and on the carry in) feed a carry select
// adder whose sum and carry out are registered again, so the adder sits on a
// register-to-register path and must settle within one clock cycle.
//
// Timing: operands present at rising edge t appear on sum/cout after rising
// edge t+1 (two register stages). Every register loads on every edge.
// Registering cin and cout alongside A, B and the sum, and the asynchronous
// active-low reset that clears all of them, are this design's choices.
module csa32_reg #(
  parameter int                  W  = 32,
  parameter int                  BW = 4,
  parameter csa_pkg::fa_design_e FA = csa_pkg::FA_MINORITY
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W-1:0] a_q, b_q, s_d;
  logic         cin_q, c_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q   <= '0;
      b_q   <= '0;
      cin_q <= 1'b0;
    end else begin
      a_q   <= a;
      b_q   <= b;
      cin_q <= cin;
    end
  end

  csa #(.W(W), .BW(BW), .FA(FA)) u_csa (
    .a(a_q), .b(b_q), .cin(cin_q), .s(s_d), .cout(c_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum  <= '0;
      cout <= 1'b0;
    end else begin
      sum  <= s_d;
      cout <= c_d;
    end
  end
endmodule
