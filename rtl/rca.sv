// rca: W-bit ripple carry adder.
//
// A chain of W one-bit full adders; the carry of bit i feeds bit i+1. The
// full-adder cell is chosen by FA (see csa_pkg). Purely combinational; the
// delay grows linearly with W. The default width of 4 matches the 4-bit
// blocks of the carry select adder that uses it.
module rca #(
  parameter int                  W  = 4,
  parameter csa_pkg::fa_design_e FA = csa_pkg::FA_MINORITY
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    if (FA == csa_pkg::FA_HALF_ADDERS) begin : g_ha
      fa_ha u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .s(s[i]), .cout(c[i+1]));
    end else begin : g_min
      fa_minority u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .s(s[i]), .cout(c[i+1]));
    end
  end

  assign cout = c[W];
endmodule
