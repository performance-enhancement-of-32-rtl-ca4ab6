// half_adder: one-bit half adder, s = a XOR b, c = a AND b.
// Purely combinational. Used in pairs to build the design-1 full adder.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
