// wallace_level1: first level of the hierarchical 8x8 Wallace tree. It
// multiplies the low nibbles of the operands on its own: the four 4-bit
// partial-product rows a[3:0] & b[j] (j = 0..3) are shifted to their weight,
// reduced to two rows by one row of 4:2 compressors, and added by an 8-bit
// carry look-ahead adder. Its 8-bit result is the whole product in 4-bit
// mode and the low-quadrant term of the product in 8-bit mode.
// Input pp[j][i] = a[i] & b[j]. Combinational. The level split follows the
// original design; the choice of the low quadrant as level 1 is this
// design's reading of it.
module wallace_level1 (
  input  logic [3:0][3:0] pp,
  output logic [7:0]      p
);
  logic [3:0][7:0] rows;
  logic [7:0]      s, c;
  logic            unused_cout, unused_pg, unused_gg;

  for (genvar j = 0; j < 4; j++) begin : g_row
    assign rows[j] = 8'(pp[j]) << j;
  end

  csa_row_4_2 #(.W(8)) u_red (.x0(rows[0]), .x1(rows[1]), .x2(rows[2]),
                              .x3(rows[3]), .sum(s), .carry(c));

  cla8 u_add (.a(s), .b(c), .cin(1'b0), .sum(p), .cout(unused_cout),
              .pg(unused_pg), .gg(unused_gg));
endmodule
