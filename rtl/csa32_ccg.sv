// csa32_ccg: registered 32-bit carry select adder with common clock gating.
//
// The same register-to-register adder as csa32_reg, but the register banks
// are clocked through latch-based clock gates. When en is low the operand
// registers get no clock edge at all, so neither they nor the adder behind
// them toggle. The output bank is gated with en delayed by one cycle (en_q),
// so it takes the one sum that a loaded operand set produces and then stops
// too.
//
// Interface and timing: operands present with en high at rising edge t appear
// on sum/cout after edge t+1; while en is low the outputs hold. Functionally
// this equals a two-stage register pipeline with load enable en. The enable
// port, the delayed enable for the output bank and the asynchronous
// active-low reset are this design's choices.
module csa32_ccg #(
  parameter int                  W  = 32,
  parameter int                  BW = 4,
  parameter csa_pkg::fa_design_e FA = csa_pkg::FA_MINORITY
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W-1:0] a_q, b_q, s_d;
  logic         cin_q, c_d, en_q;
  logic         gclk_in, gclk_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) en_q <= 1'b0;
    else        en_q <= en;
  end

  clock_gate u_cg_in  (.clk(clk), .en(en),   .gclk(gclk_in));
  clock_gate u_cg_out (.clk(clk), .en(en_q), .gclk(gclk_out));

  always_ff @(posedge gclk_in or negedge rst_n) begin
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

  always_ff @(posedge gclk_out or negedge rst_n) begin
    if (!rst_n) begin
      sum  <= '0;
      cout <= 1'b0;
    end else begin
      sum  <= s_d;
      cout <= c_d;
    end
  end
endmodule
