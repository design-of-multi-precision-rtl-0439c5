// cla4: 4-bit carry look-ahead adder. Four modified full adders give the
// per-bit propagate p[i] and generate g[i]; the look-ahead logic computes
// every carry directly from p, g and cin in two gate levels:
//   c1 = g0 | p0 c0
//   c2 = g1 | p1 g0 | p1 p0 c0          (and so on up to c4)
// The block also gives its group propagate and group generate so that
// cla8 can look ahead across blocks. sum + 16*cout = a + b + cin.
// Building the CLA from modified full adders follows the original design;
// the group outputs are this design's choice. Combinational.
module cla4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] sum,
  output logic       cout,
  output logic       pg,
  output logic       gg
);
  logic [3:0] p, g;
  logic [4:0] c;

  for (genvar i = 0; i < 4; i++) begin : g_bit
    mod_full_adder u_mfa (.a(a[i]), .b(b[i]), .cin(c[i]),
                          .sum(sum[i]), .p(p[i]), .g(g[i]));
  end

  assign c[0] = cin;
  assign c[1] = g[0] | (p[0] & cin);
  assign c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
  assign c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0])
              | (p[2] & p[1] & p[0] & cin);
  assign gg   = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1])
              | (p[3] & p[2] & p[1] & g[0]);
  assign pg   = &p;
  assign c[4] = gg | (pg & cin);
  assign cout = c[4];
endmodule
