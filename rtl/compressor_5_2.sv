// compressor_5_2: 5:2 compressor made of three full adders in series. It
// takes five bits of one column plus two lateral carries from the column to
// its right and produces a sum bit, a carry bit and two lateral carries:
//   x1 + x2 + x3 + x4 + x5 + cin1 + cin2 = sum + 2*(carry + cout1 + cout2)
// cout1 depends only on x1..x3 and cout2 only on the first adder and cin1,
// so a row of these compressors does not ripple. Combinational.
// The three-full-adder structure is this design's choice.
module compressor_5_2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic x5,
  input  logic cin1,
  input  logic cin2,
  output logic sum,
  output logic carry,
  output logic cout1,
  output logic cout2
);
  logic s1, s2;

  full_adder u_fa0 (.a(x1), .b(x2), .cin(x3),   .sum(s1),  .cout(cout1));
  full_adder u_fa1 (.a(s1), .b(x4), .cin(cin1), .sum(s2),  .cout(cout2));
  full_adder u_fa2 (.a(s2), .b(x5), .cin(cin2), .sum(sum), .cout(carry));
endmodule
