// mod_full_adder: the modified full adder of a carry look-ahead adder. It
// gives the sum bit and, instead of a carry out, the bit's propagate
// (p = a xor b) and generate (g = a and b) signals, which the look-ahead
// logic of cla4 turns into carries. Built from a half adder (p, g) and an
// XOR for the sum. Combinational.
module mod_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic p,
  output logic g
);
  half_adder u_ha (.a(a), .b(b), .sum(p), .carry(g));

  assign sum = p ^ cin;
endmodule
