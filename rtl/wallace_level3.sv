// wallace_level3: third level of the hierarchical 8x8 Wallace tree. It adds
// the low-quadrant product from level 1 (8 bits, weight 1) to the sum and
// carry rows from level 2: a row of full adders brings the three rows down
// to two, and the 16-bit carry look-ahead adder produces the final product.
// p = p_ll + sum + carry (mod 2**16). Combinational; unused in 4-bit mode.
// The CLA at the third level follows the original design; the full-adder
// row ahead of it is this design's choice.
module wallace_level3 (
  input  logic [7:0]  p_ll,
  input  logic [15:0] sum,
  input  logic [15:0] carry,
  output logic [15:0] p
);
  logic [15:0] s, c;
  logic        unused_cout, unused_pg, unused_gg;

  csa_row_3_2 #(.W(16)) u_red (.x0(16'(p_ll)), .x1(sum), .x2(carry),
                               .sum(s), .carry(c));

  cla16 u_add (.a(s), .b(c), .cin(1'b0), .sum(p), .cout(unused_cout),
               .pg(unused_pg), .gg(unused_gg));
endmodule
