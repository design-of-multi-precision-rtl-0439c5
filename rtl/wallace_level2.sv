// wallace_level2: second level of the hierarchical 8x8 Wallace tree. It
// reduces the partial products of the three other quadrants of the 8x8
// array - a[7:4]*b[3:0] and a[3:0]*b[7:4] at weight 2**4, a[7:4]*b[7:4] at
// weight 2**8 - twelve 4-bit rows in all, to one sum row and one carry row
// of 16 bits, using 4:2 compressors only:
//   stage A: each quadrant's four rows -> two            (12 -> 6 rows)
//   stage B: the two middle quadrants' four rows -> two  ( 6 -> 4 rows)
//   stage C: the remaining four rows -> two              ( 4 -> 2 rows)
// Inputs: pp_hl[j][i] = a[4+i] & b[j], pp_lh[j][i] = a[i] & b[4+j],
// pp_hh[j][i] = a[4+i] & b[4+j]. sum + carry equals the three quadrants'
// total. Combinational; unused in 4-bit mode. The split of the tree into
// levels follows the original design; this level's reduction order is this
// design's choice.
module wallace_level2 (
  input  logic [3:0][3:0] pp_hl,
  input  logic [3:0][3:0] pp_lh,
  input  logic [3:0][3:0] pp_hh,
  output logic [15:0]     sum,
  output logic [15:0]     carry
);
  logic [3:0][15:0] r_hl, r_lh, r_hh;
  logic [15:0] s_hl, c_hl, s_lh, c_lh, s_hh, c_hh, s_b, c_b;

  for (genvar j = 0; j < 4; j++) begin : g_row
    assign r_hl[j] = 16'(pp_hl[j]) << (4 + j);
    assign r_lh[j] = 16'(pp_lh[j]) << (4 + j);
    assign r_hh[j] = 16'(pp_hh[j]) << (8 + j);
  end

  csa_row_4_2 #(.W(16)) u_a_hl (.x0(r_hl[0]), .x1(r_hl[1]), .x2(r_hl[2]),
                                .x3(r_hl[3]), .sum(s_hl), .carry(c_hl));
  csa_row_4_2 #(.W(16)) u_a_lh (.x0(r_lh[0]), .x1(r_lh[1]), .x2(r_lh[2]),
                                .x3(r_lh[3]), .sum(s_lh), .carry(c_lh));
  csa_row_4_2 #(.W(16)) u_a_hh (.x0(r_hh[0]), .x1(r_hh[1]), .x2(r_hh[2]),
                                .x3(r_hh[3]), .sum(s_hh), .carry(c_hh));

  csa_row_4_2 #(.W(16)) u_b (.x0(s_hl), .x1(c_hl), .x2(s_lh), .x3(c_lh),
                             .sum(s_b), .carry(c_b));

  csa_row_4_2 #(.W(16)) u_c (.x0(s_b), .x1(c_b), .x2(s_hh), .x3(c_hh),
                             .sum(sum), .carry(carry));
endmodule
