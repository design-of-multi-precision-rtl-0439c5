// cla16: 16-bit carry look-ahead adder made of two cla8 blocks, with the
// carry into the upper byte looked ahead from the lower byte's group
// propagate/generate. It is the final (third-level) adder of the 8x8
// multipliers, which add their last two rows with it.
// sum + 65536*cout = a + b + cin. Combinational.
module cla16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        cin,
  output logic [15:0] sum,
  output logic        cout,
  output logic        pg,
  output logic        gg
);
  logic p0, g0, p1, g1, c8;
  logic unused_cout0, unused_cout1;

  cla8 u_lo (.a(a[7:0]),  .b(b[7:0]),  .cin(cin), .sum(sum[7:0]),
             .cout(unused_cout0), .pg(p0), .gg(g0));
  cla8 u_hi (.a(a[15:8]), .b(b[15:8]), .cin(c8),  .sum(sum[15:8]),
             .cout(unused_cout1), .pg(p1), .gg(g1));

  assign c8   = g0 | (p0 & cin);
  assign gg   = g1 | (p1 & g0);
  assign pg   = p1 & p0;
  assign cout = gg | (pg & cin);
endmodule
