// half_adder: one-bit half adder, sum = a XOR b, carry = a AND b.
// Combinational; the basic cell of the half-adder circuit under test.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
