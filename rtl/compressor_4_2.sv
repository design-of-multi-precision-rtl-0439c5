// compressor_4_2: conventional 4:2 compressor made of two full adders in
// series. It takes five bits of one column (four partial-product bits x1..x4
// and the lateral carry cin from the column to its right) and produces
// three: sum at the column's weight, carry and cout at twice that weight:
//   x1 + x2 + x3 + x4 + cin = sum + 2*(carry + cout)
// cout depends only on x1..x3, so chaining cout into the next column's cin
// does not ripple. Combinational.
module compressor_4_2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic s1;

  full_adder u_fa0 (.a(x1), .b(x2), .cin(x3),  .sum(s1),  .cout(cout));
  full_adder u_fa1 (.a(s1), .b(x4), .cin(cin), .sum(sum), .cout(carry));
endmodule
