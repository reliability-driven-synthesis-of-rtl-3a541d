// half_adder: one-bit half adder (sum = a ^ b, carry = a & b), a leaf cell
// of the Berger check-bit generator. Combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  assign s  = a ^ b;
  assign co = a & b;
endmodule
