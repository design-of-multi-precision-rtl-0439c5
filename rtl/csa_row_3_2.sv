// csa_row_3_2: a row of W full adders that reduces three W-bit rows of a
// partial-product array to two (carry-save addition). Each column's carry
// is passed up one column, so
//   sum + carry == x0 + x1 + x2   (mod 2**W)
// with carry already aligned to its weight (carry[0] is 0). The carry out of
// the top column is dropped: the caller sizes W so that the result fits.
// Combinational.
module csa_row_3_2 #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x0,
  input  logic [W-1:0] x1,
  input  logic [W-1:0] x2,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-1:0] cy;

  for (genvar i = 0; i < W; i++) begin : g_col
    full_adder u_fa (.a(x0[i]), .b(x1[i]), .cin(x2[i]),
                     .sum(sum[i]), .cout(cy[i]));
  end

  assign carry = {cy[W-2:0], 1'b0};
endmodule
