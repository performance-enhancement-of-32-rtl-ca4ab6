// fa_ha: one-bit full adder made of two half adders ("design 1").
//
// The first half adder adds a and b; the second adds their partial sum to the
// carry in. The carry out is the OR of the two half-adder carries, which gives
//   s    = a ^ b ^ cin
//   cout = ab + cin(a ^ b)
// Purely combinational, no timing of its own.
module fa_ha (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  logic p, g, c2;

  half_adder u_ha0 (.a(a),   .b(b),   .s(p), .c(g));
  half_adder u_ha1 (.a(p),   .b(cin), .s(s), .c(c2));

  assign cout = g | c2;
endmodule
