// csa: W-bit carry select adder, combinational.
//
// The operands are cut into W/BW blocks of BW bits. The lowest block is a
// single ripple carry adder fed by cin, since nothing is gained by guessing
// its carry. Every higher block holds two ripple carry adders that work in
// parallel, one assuming a carry in of 0 and one assuming 1. When the real
// carry from the block below arrives it only has to pick the precomputed sum
// through a multiplexer and form the block's carry out as
//   c_out = c_out(assumed 0) | (c_in & c_out(assumed 1)),
// so the carry crosses one select stage per block instead of BW full adders.
//
// The structure (one adder in the first block, two in the others, sum mux,
// 4-bit blocks) follows the 16-bit example this family is based on; extending
// it to 32 bits with the same 4-bit blocks is this design's choice.
// W must be a multiple of BW.
module csa #(
  parameter int                  W  = 32,
  parameter int                  BW = 4,
  parameter csa_pkg::fa_design_e FA = csa_pkg::FA_MINORITY
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  localparam int NB = W / BW;

  if (W % BW != 0) begin : g_bad_width
    $error("csa: W (%0d) must be a multiple of BW (%0d)", W, BW);
  end

  // c[k] is the carry into block k.
  logic [NB:0] c;

  assign c[0] = cin;

  for (genvar k = 0; k < NB; k++) begin : g_blk
    if (k == 0) begin : g_first
      rca #(.W(BW), .FA(FA)) u_rca (
        .a(a[BW-1:0]), .b(b[BW-1:0]), .cin(c[0]), .s(s[BW-1:0]), .cout(c[1])
      );
    end else begin : g_sel
      logic [BW-1:0] s0, s1;
      logic          c0, c1;

      rca #(.W(BW), .FA(FA)) u_rca0 (
        .a(a[k*BW +: BW]), .b(b[k*BW +: BW]), .cin(1'b0), .s(s0), .cout(c0)
      );
      rca #(.W(BW), .FA(FA)) u_rca1 (
        .a(a[k*BW +: BW]), .b(b[k*BW +: BW]), .cin(1'b1), .s(s1), .cout(c1)
      );

      assign s[k*BW +: BW] = c[k] ? s1 : s0;
      assign c[k+1]        = c0 | (c[k] & c1);
    end
  end

  assign cout = c[NB];
endmodule
