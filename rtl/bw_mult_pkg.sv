// Shared types for the configurable Baugh-Wooley multiplier modules.
//
// numsys_t selects the number representation a multiplier works in. The
// three systems are the ones the modules are built to handle: unsigned,
// signed-magnitude (the array multiplies the magnitudes and the product sign
// is formed outside by an XOR gate) and two's complement (modified
// Baugh-Wooley: some partial products are negated and a correcting term is
// added). The 2-bit encoding is this design's own choice.
//
// bw_ctrl_t is the set of control signals one n x n module needs. It is
// produced by bw_ctrl_decoder from the module's position in a concatenation
// and the number system, so that only a short code has to be routed to each
// module.
package bw_mult_pkg;

  typedef enum logic [1:0] {
    NS_UNSIGNED  = 2'd0,
    NS_SIGNMAG   = 2'd1,
    NS_TWOSCOMP  = 2'd2
  } numsys_t;

  typedef struct packed {
    logic cin_ext;   // row carry-ins come from the right (less significant) neighbour, else 0
    logic top_ext;   // top-row sum inputs come from the module above, else 0
    logic msb_own;   // MSB-column sum input of each row is this module's own row carry-out,
                     // else the left (more significant) neighbour's column-0 sum
    logic inv_col;   // negate the partial products of the leftmost cell column
    logic inv_row;   // negate the partial products of the bottom cell row
    logic mask_a;    // force the MSB multiplicand bit to 0 (sign bit in signed-magnitude)
    logic mask_b;    // force the MSB multiplier bit to 0 (sign bit in signed-magnitude)
    logic corr_a;    // add the correcting term 2^(WA-1) (WA = multiplicand width)
    logic corr_b;    // add the correcting term 2^(WB-1) (WB = multiplier width)
    logic corr_hi;   // add the correcting term 2^(WA+WB-1)
  } bw_ctrl_t;

endpackage
