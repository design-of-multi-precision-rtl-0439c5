// csa_row_5_2: a row of W 5:2 compressors that reduces five W-bit rows of a
// partial-product array to two. The two lateral carries of each column feed
// the two carry inputs of the column to its left; the carry output of each
// column is passed up one column, so
//   sum + carry == x0 + x1 + x2 + x3 + x4   (mod 2**W)
// with carry aligned to its weight. What leaves the top column is dropped:
// the caller sizes W so that the result fits. Combinational.
module csa_row_5_2 #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x0,
  input  logic [W-1:0] x1,
  input  logic [W-1:0] x2,
  input  logic [W-1:0] x3,
  input  logic [W-1:0] x4,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-1:0] cy;
  logic [W:0]   lat1, lat2;

  assign lat1[0] = 1'b0;
  assign lat2[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_col
    compressor_5_2 u_c52 (.x1(x0[i]), .x2(x1[i]), .x3(x2[i]), .x4(x3[i]),
                          .x5(x4[i]), .cin1(lat1[i]), .cin2(lat2[i]),
                          .sum(sum[i]), .carry(cy[i]),
                          .cout1(lat1[i+1]), .cout2(lat2[i+1]));
  end

  assign carry = {cy[W-2:0], 1'b0};
endmodule
