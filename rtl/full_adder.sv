// full_adder: one-bit full adder (3:2 counter) built from two half adders
// and an OR gate. a + b + cin = sum + 2*cout. Combinational.
// The half-adder construction is this design's choice; the counting
// behaviour is the standard full adder used by the compressors and rows.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic s1, c1, c2;

  half_adder u_ha0 (.a(a),  .b(b),   .sum(s1),  .carry(c1));
  half_adder u_ha1 (.a(s1), .b(cin), .sum(sum), .carry(c2));

  assign cout = c1 | c2;
endmodule
