// rwtm_top: the two multipliers of the design side by side, each behind an
// output register.
//  - Reconfigurable hierarchical Wallace tree multiplier (wallace_mult8):
//    unsigned 4x4 (wt_prec = PREC_4BIT) or 8x8 (PREC_8BIT) products.
//  - Multi-precision Booth multiplier (booth_mult_8n, BM_BYTES = 2 by
//    default): one 16x16 product or two 8x8 products, signed (bm_tc = 1) or
//    unsigned.
// Timing: both multipliers are combinational; operands presented with
// *_valid_i in one cycle give the registered product with *_valid_o on the
// next rising clock edge (latency 1, one operation per cycle). wt_levels_on
// is registered with the Wallace product and shows which tree levels did
// the work. Reset (rst_n low, asynchronous) clears the valids and outputs.
// The registers are this design's choice: the multipliers themselves are
// combinational arrays.
module rwtm_top
  import rwtm_pkg::*;
#(
  parameter int unsigned BM_BYTES = 2   // Booth operand width in bytes
) (
  input  logic        clk,
  input  logic        rst_n,
  // Wallace tree multiplier
  input  logic        wt_valid_i,
  input  logic [7:0]  wt_a,
  input  logic [7:0]  wt_b,
  input  wt_prec_e    wt_prec,
  output logic        wt_valid_o,
  output logic [15:0] wt_p,
  output logic [2:0]  wt_levels_on,
  // Multi-precision Booth multiplier
  input  logic        bm_valid_i,
  input  logic [8*BM_BYTES-1:0]  bm_a,
  input  logic [8*BM_BYTES-1:0]  bm_b,
  input  logic        bm_tc,
  input  bm_mode_e    bm_mode,
  output logic        bm_valid_o,
  output logic [16*BM_BYTES-1:0] bm_p
);
  logic [15:0] wt_p_c;
  logic [2:0]  wt_lv_c;
  logic [16*BM_BYTES-1:0] bm_p_c;

  wallace_mult8 u_wt (.a(wt_a), .b(wt_b), .prec(wt_prec), .p(wt_p_c),
                      .levels_on(wt_lv_c));

  booth_mult_8n #(.NB(BM_BYTES)) u_bm (.a(bm_a), .b(bm_b), .tc(bm_tc),
                                       .mode(bm_mode), .p(bm_p_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wt_valid_o   <= 1'b0;
      wt_p         <= '0;
      wt_levels_on <= '0;
      bm_valid_o   <= 1'b0;
      bm_p         <= '0;
    end else begin
      wt_valid_o <= wt_valid_i;
      bm_valid_o <= bm_valid_i;
      if (wt_valid_i) begin
        wt_p         <= wt_p_c;
        wt_levels_on <= wt_lv_c;
      end
      if (bm_valid_i) begin
        bm_p <= bm_p_c;
      end
    end
  end
endmodule
