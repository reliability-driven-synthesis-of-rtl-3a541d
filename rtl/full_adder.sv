// full_adder: one-bit full adder (sum = a ^ b ^ ci, carry = majority), the
// main leaf cell of the Berger check-bit generator. Combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (a & ci) | (b & ci);
endmodule
