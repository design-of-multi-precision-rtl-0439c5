// booth_pp_row: one row of a radix-4 Modified Booth multiplier. The encoder
// turns three overlapping multiplier bits (b[2k+1], b[2k], b[2k-1]) into a
// digit in {-2,-1,0,+1,+2}:
//   one = b[2k] ^ b[2k-1]          |digit| = 1
//   two = 100 or 011               |digit| = 2
//   neg = b[2k+1] & ~(b[2k] & b[2k-1])   (111 is +0, not -0)
// The selector picks 0, A or 2A from the 9-bit two's-complement multiplicand
// and, for a negative digit, inverts it. The row value is therefore
//   digit * A == $signed(row) + neg
// where the +1 of the two's complement (neg) is added by the caller in the
// row's least significant column. Combinational.
module booth_pp_row
  import rwtm_pkg::*;
(
  input  logic [2:0]   bits,   // {b[2k+1], b[2k], b[2k-1]}
  input  logic [8:0]   a,      // multiplicand, two's complement
  output booth_digit_t digit,
  output logic [9:0]   row,
  output logic         neg
);
  logic [9:0] mag;

  always_comb begin
    digit.one = bits[1] ^ bits[0];
    digit.two = (bits == 3'b100) || (bits == 3'b011);
    digit.neg = bits[2] & ~(bits[1] & bits[0]);

    if (digit.one)      mag = {a[8], a};
    else if (digit.two) mag = {a, 1'b0};
    else                mag = '0;

    row = digit.neg ? ~mag : mag;
    neg = digit.neg;
  end
endmodule
