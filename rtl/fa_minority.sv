// fa_minority: one-bit full adder that derives its sum from its carry
// ("design 2").
//
// The complemented carry out is the minority function of a, b and cin (true
// when at most one input is 1). The sum reuses it:
//   cout = ab + cin(a + b)
//   s    = abc + (a + b + cin) cout'
// The second expression is 1 when all three inputs are 1, or when at least one
// is 1 and at most one is 1, which is exactly the odd-parity cases. Both
// outputs are formed in complemented form and then inverted, as in the
// inverting-gate cell this models. Purely combinational.
module fa_minority (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  logic cout_n, s_n;

  assign cout_n = ~((a & b) | (cin & (a | b)));
  assign s_n    = ~((a & b & cin) | ((a | b | cin) & cout_n));
  assign cout   = ~cout_n;
  assign s      = ~s_n;
endmodule
