// pp_and_array: generates all N*N partial-product bits of an unsigned NxN
// multiplication in parallel with AND gates: pp[j][i] = a[i] & b[j], which
// has weight 2**(i+j). Row j is the multiplicand gated by multiplier bit j.
// Combinational. AND-gate generation follows the original design.
module pp_and_array #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]         a,
  input  logic [N-1:0]         b,
  output logic [N-1:0][N-1:0]  pp
);
  for (genvar j = 0; j < N; j++) begin : g_row
    assign pp[j] = a & {N{b[j]}};
  end
endmodule
