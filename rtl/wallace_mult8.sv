// wallace_mult8: reconfigurable hierarchical 8x8 Wallace tree multiplier for
// unsigned operands, working either as a 4x4 or as an 8x8 multiplier.
//
// All 64 partial-product bits are made in parallel by AND gates
// (pp_and_array). The reduction is split into three levels:
//   level 1  the low-nibble 4x4 product, complete with its own 8-bit CLA
//   level 2  Wallace reduction (4:2 compressors) of the other three quadrants
//   level 3  full-adder row plus the 16-bit CLA for the final product
// In 4-bit mode (prec = PREC_4BIT) only level 1 works: the product is
// a[3:0]*b[3:0], zero-extended, and the upper operand nibbles are ignored.
// Levels 2 and 3 are then isolated: their inputs are held at zero so that
// nothing in them toggles. This operand isolation is the logic-level
// counterpart of switching the supply of those levels off; the supply
// switches themselves are a physical-design matter and are not modelled.
// levels_on shows which levels are in use (bit k-1 for level k).
// In 8-bit mode p = a*b. Combinational.
module wallace_mult8
  import rwtm_pkg::*;
(
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  input  wt_prec_e    prec,
  output logic [15:0] p,
  output logic [2:0]  levels_on
);
  logic [7:0][7:0] pp;
  logic            hi_en;
  logic [3:0][3:0] pp_ll, pp_hl, pp_lh, pp_hh;
  logic [7:0]      p_ll, p_ll_l3;
  logic [15:0]     s2, c2, p_full;

  pp_and_array #(.N(8)) u_pp (.a(a), .b(b), .pp(pp));

  assign hi_en = (prec == PREC_8BIT);

  for (genvar j = 0; j < 4; j++) begin : g_split
    assign pp_ll[j] = pp[j][3:0];
    assign pp_hl[j] = pp[j][7:4]     & {4{hi_en}};
    assign pp_lh[j] = pp[4+j][3:0]   & {4{hi_en}};
    assign pp_hh[j] = pp[4+j][7:4]   & {4{hi_en}};
  end

  wallace_level1 u_l1 (.pp(pp_ll), .p(p_ll));

  wallace_level2 u_l2 (.pp_hl(pp_hl), .pp_lh(pp_lh), .pp_hh(pp_hh),
                       .sum(s2), .carry(c2));

  assign p_ll_l3 = p_ll & {8{hi_en}};

  wallace_level3 u_l3 (.p_ll(p_ll_l3), .sum(s2), .carry(c2), .p(p_full));

  assign p         = hi_en ? p_full : {8'b0, p_ll};
  assign levels_on = {hi_en, hi_en, 1'b1};
endmodule
