// rwtm_pkg: types shared by the reconfigurable Wallace tree multiplier and
// the multi-precision Booth multiplier.
//  - wt_prec_e selects the operand width of the hierarchical Wallace
//    multiplier: 4-bit mode keeps only the first level of the tree active,
//    8-bit mode uses all three levels.
//  - bm_mode_e selects how the 8n x 8n Booth multiplier uses its n*n 8x8
//    units: one full-width product, or n independent 8x8 products.
//  - booth_digit_t is a radix-4 Booth digit in sign/magnitude form
//    (value = (neg ? -1 : +1) * (one ? 1 : two ? 2 : 0)).
// The encodings are this design's choice.
package rwtm_pkg;

  typedef enum logic {
    PREC_4BIT = 1'b0,
    PREC_8BIT = 1'b1
  } wt_prec_e;

  typedef enum logic {
    BM_SINGLE = 1'b0,
    BM_LANES8 = 1'b1
  } bm_mode_e;

  typedef struct packed {
    logic neg;
    logic one;
    logic two;
  } booth_digit_t;

endpackage
