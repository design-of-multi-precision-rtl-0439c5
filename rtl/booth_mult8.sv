// booth_mult8: 8x8 radix-4 Modified Booth multiplier unit, the building
// block of the multi-precision multiplier (booth_mult_8n).
//
// Each operand is either two's complement or unsigned (a_signed, b_signed),
// so that four of these units can be cascaded into a wider multiplier whose
// lower halves are unsigned. The multiplicand is extended to 9 bits with its
// sign (or a zero). The multiplier is recoded into radix-4 Booth digits:
// a signed multiplier gives 4 digits, so the 8 AND rows of 8 bits become
// 4 rows of 9(+1) bits; an unsigned multiplier needs a fifth digit (its top
// bit), which is zero for signed operands. Each row is 10 bits of two's
// complement at offset 2k. Instead of copying each row's sign bit up to bit
// 15, the sign-extension circuit inverts the row's most significant bit and
// adds one constant for all rows:
//   sext(row) = {~row[9], row[8:0]} - 2**9          (per row, mod 2**16)
//   SIGN_FIX  = -(2**9 + 2**11 + 2**13 + 2**15) mod 2**16 = 16'h5600
// (the fifth row's term, 2**17, vanishes modulo 2**16). SIGN_FIX shares a
// row with the +1 bits of negative digits (bits 0, 2, 4, 6, 8), which do not
// overlap it. The five rows are reduced by a row of 5:2 compressors, that
// sixth row is merged by a full-adder row, and the 16-bit CLA gives the
// product. p is the 16-bit product, two's complement when either
// operand is signed; every product of the four sign combinations fits.
// Combinational.
module booth_mult8
  import rwtm_pkg::*;
(
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  input  logic        a_signed,
  input  logic        b_signed,
  output logic [15:0] p
);
  localparam int unsigned NDIG = 5;
  localparam logic [15:0] SIGN_FIX = 16'h5600;

  logic [8:0]        a9;
  logic              b_ext;
  logic [10:0]       bb;       // {ext, ext, b, 0}: bb[i+1] = b[i]
  booth_digit_t      digit [NDIG];
  logic [9:0]        row   [NDIG];
  logic [NDIG-1:0]   neg;
  logic [NDIG-1:0][15:0] rows;
  logic [15:0]       neg_row, s5, c5, s3, c3;
  logic              unused_cout, unused_pg, unused_gg;

  assign a9    = {a_signed & a[7], a};
  assign b_ext = b_signed & b[7];
  assign bb    = {b_ext, b_ext, b, 1'b0};

  for (genvar k = 0; k < NDIG; k++) begin : g_dig
    booth_pp_row u_row (.bits(bb[2*k+2:2*k]), .a(a9), .digit(digit[k]),
                        .row(row[k]), .neg(neg[k]));
    assign rows[k] = 16'({~row[k][9], row[k][8:0]}) << (2 * k);
  end

  always_comb begin
    neg_row = SIGN_FIX;
    for (int k = 0; k < NDIG; k++) neg_row[2*k] = neg[k];
  end

  csa_row_5_2 #(.W(16)) u_c52 (.x0(rows[0]), .x1(rows[1]), .x2(rows[2]),
                               .x3(rows[3]), .x4(rows[4]),
                               .sum(s5), .carry(c5));

  csa_row_3_2 #(.W(16)) u_c32 (.x0(s5), .x1(c5), .x2(neg_row),
                               .sum(s3), .carry(c3));

  cla16 u_add (.a(s3), .b(c3), .cin(1'b0), .sum(p), .cout(unused_cout),
               .pg(unused_pg), .gg(unused_gg));
endmodule
