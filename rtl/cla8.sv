// cla8: 8-bit carry look-ahead adder made of two cla4 blocks. The carry
// into the upper block is looked ahead from the lower block's group signals
// (c4 = G0 | P0 cin) rather than rippled through it; the block gives its own
// group propagate/generate for the next level (cla16).
// sum + 256*cout = a + b + cin. Combinational.
module cla8 (
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       cin,
  output logic [7:0] sum,
  output logic       cout,
  output logic       pg,
  output logic       gg
);
  logic p0, g0, p1, g1, c4;
  logic unused_cout0, unused_cout1;

  cla4 u_lo (.a(a[3:0]), .b(b[3:0]), .cin(cin), .sum(sum[3:0]),
             .cout(unused_cout0), .pg(p0), .gg(g0));
  cla4 u_hi (.a(a[7:4]), .b(b[7:4]), .cin(c4),  .sum(sum[7:4]),
             .cout(unused_cout1), .pg(p1), .gg(g1));

  assign c4   = g0 | (p0 & cin);
  assign gg   = g1 | (p1 & g0);
  assign pg   = p1 & p0;
  assign cout = gg | (pg & cin);
endmodule
