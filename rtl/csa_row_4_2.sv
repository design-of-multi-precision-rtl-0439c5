// csa_row_4_2: a row of W 4:2 compressors that reduces four W-bit rows of a
// partial-product array to two. The lateral carry (cout) of each column
// feeds the cin of the column to its left; the carry output of each column
// is passed up one column, so
//   sum + carry == x0 + x1 + x2 + x3   (mod 2**W)
// with carry aligned to its weight. What leaves the top column is dropped:
// the caller sizes W so that the result fits. Combinational.
module csa_row_4_2 #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x0,
  input  logic [W-1:0] x1,
  input  logic [W-1:0] x2,
  input  logic [W-1:0] x3,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-1:0] cy;
  logic [W:0]   lat;

  assign lat[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_col
    compressor_4_2 u_c42 (.x1(x0[i]), .x2(x1[i]), .x3(x2[i]), .x4(x3[i]),
                          .cin(lat[i]), .sum(sum[i]), .carry(cy[i]),
                          .cout(lat[i+1]));
  end

  assign carry = {cy[W-2:0], 1'b0};
endmodule
