// csa32_ecg: registered 32-bit carry select adder with enhanced clock gating.
//
// The operand bank {cin, B, A} and the result bank {cout, sum} are each an
// ecg_reg: a bank is clocked only when at least one of its bits would change
// (XOR of input against stored output, ORed over the bank). The operand bank
// is additionally gated by en; the result bank is gated by change detection
// alone, since it can only change after the operands did.
//
// Interface and timing: operands present with en high at rising edge t appear
// on sum/cout after edge t+1; while en is low the outputs hold. Functionally
// this equals csa32_ccg. Grouping the registers into these two banks, the en
// port and the asynchronous active-low reset are this design's choices.
module csa32_ecg #(
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
  logic         cin_q, c_d;

  ecg_reg #(.W(2*W+1)) u_in (
    .clk(clk), .rst_n(rst_n), .en(en),
    .d({cin, b, a}), .q({cin_q, b_q, a_q})
  );

  csa #(.W(W), .BW(BW), .FA(FA)) u_csa (
    .a(a_q), .b(b_q), .cin(cin_q), .s(s_d), .cout(c_d)
  );

  ecg_reg #(.W(W+1)) u_out (
    .clk(clk), .rst_n(rst_n), .en(1'b1),
    .d({c_d, s_d}), .q({cout, sum})
  );
endmodule
