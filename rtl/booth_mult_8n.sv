// booth_mult_8n: multi-precision 8n x 8n Booth multiplier made by cascading
// n*n 8x8 Booth units (booth_mult8), one per pair of operand bytes. Unit
// (i, j) multiplies a byte i by b byte j and its product has weight
// 2**(8*(i+j)). The default, NB = 2, is the 16x16 multiplier built from four
// 8x8 units.
//
// Only the top byte of an operand carries its sign (tc = 1 for two's
// complement operands, 0 for unsigned); lower bytes are unsigned. Each unit
// is told which of its operands is signed, and its 16-bit sub-product is
// sign-extended to the full 16*NB bits only when one of them is. The NB*NB
// sub-products are then summed by the reconfigurable addition stage: a
// chain of 4:2 compressor rows, each taking the running sum/carry pair and
// two more sub-products (NB = 2 needs exactly one row), followed by NB
// 16-bit CLAs with the carry passed from one to the next.
//
// mode selects the precision:
//   BM_SINGLE  p = a * b                       (one 8NB x 8NB product)
//   BM_LANES8  p = {..., a[15:8]*b[15:8], a[7:0]*b[7:0]}: NB independent
//              8x8 products, one per byte lane, each in its own 16 bits,
//              signed when tc = 1
// In lane mode only the diagonal units work: the others get zero operands
// and the addition stage is bypassed. Combinational.
// The cascade of 8x8 Booth units and its extension to 8n x 8n follow the
// original design; the lane mode, the compressor chain and the carry chain
// between the CLAs are this design's choices.
module booth_mult_8n
  import rwtm_pkg::*;
#(
  parameter int unsigned NB = 2   // operand width in bytes
) (
  input  logic [8*NB-1:0]  a,
  input  logic [8*NB-1:0]  b,
  input  logic             tc,
  input  bm_mode_e         mode,
  output logic [16*NB-1:0] p
);
  localparam int unsigned W  = 16 * NB;          // product width
  localparam int unsigned R  = NB * NB;          // sub-products
  localparam int unsigned RP = R + (R % 2);      // padded to an even count
  localparam int unsigned S  = (RP - 2) / 2;     // 4:2 rows in the chain

  logic             lanes;
  logic [15:0]      sub   [R];
  logic [W-1:0]     rows  [RP];
  logic [W-1:0]     acc_s [S+1];
  logic [W-1:0]     acc_c [S+1];
  logic [W-1:0]     sum;
  logic [NB:0]      cy;
  logic [16*NB-1:0] lane_p;

  assign lanes = (mode == BM_LANES8);

  for (genvar i = 0; i < NB; i++) begin : g_a
    for (genvar j = 0; j < NB; j++) begin : g_b
      localparam int unsigned K = i * NB + j;
      logic       en, a_sgn, b_sgn;
      logic [7:0] a_op, b_op;

      if (i == j) begin : g_diag
        assign en    = 1'b1;
        assign a_sgn = tc & (lanes | (i == NB - 1));
        assign b_sgn = tc & (lanes | (j == NB - 1));
      end else begin : g_cross
        assign en    = ~lanes;
        assign a_sgn = tc & (i == NB - 1);
        assign b_sgn = tc & (j == NB - 1);
      end

      assign a_op = a[8*i +: 8] & {8{en}};
      assign b_op = b[8*j +: 8] & {8{en}};

      booth_mult8 u_unit (.a(a_op), .b(b_op), .a_signed(a_sgn),
                          .b_signed(b_sgn), .p(sub[K]));

      // Sign extension of the sub-product to the full width.
      assign rows[K] = W'({{(W-16){(a_sgn | b_sgn) & sub[K][15]}}, sub[K]})
                       << (8 * (i + j));
    end
    assign lane_p[16*i +: 16] = sub[i * NB + i];
  end

  if (RP > R) begin : g_pad
    assign rows[R] = '0;
  end

  assign acc_s[0] = rows[0];
  assign acc_c[0] = rows[1];

  for (genvar k = 0; k < S; k++) begin : g_chain
    csa_row_4_2 #(.W(W)) u_red (.x0(acc_s[k]), .x1(acc_c[k]),
                                .x2(rows[2*k+2]), .x3(rows[2*k+3]),
                                .sum(acc_s[k+1]), .carry(acc_c[k+1]));
  end

  assign cy[0] = 1'b0;

  for (genvar m = 0; m < NB; m++) begin : g_add
    logic unused_pg, unused_gg;
    cla16 u_cla (.a(acc_s[S][16*m +: 16]), .b(acc_c[S][16*m +: 16]),
                 .cin(cy[m]), .sum(sum[16*m +: 16]), .cout(cy[m+1]),
                 .pg(unused_pg), .gg(unused_gg));
  end

  assign p = lanes ? lane_p : sum;
endmodule
