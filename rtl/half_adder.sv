// half_adder: one-bit half adder, the smallest cell of the multiplier.
// sum = a xor b, carry = a and b. Purely combinational, no timing state.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b;
  assign carry = a & b;
endmodule
