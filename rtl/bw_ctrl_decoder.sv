// Control decoder of one concatenable multiplier module.
//
// A module takes part either alone (a concatenation of one) or as one tile
// of an M x M concatenation. The decoder turns the module's tile row, tile
// column, the index of the last row/column of its concatenation and the
// number system into the interface multiplexer selects and the cell
// configuration bits of bw_ctrl_t. Row 0 is the top tile (least significant
// multiplier slice), column 0 the right tile (least significant multiplicand
// slice); row = col = last = 0 means a stand-alone module.
//
//   - interfaces: carries enter from the right unless the tile is in column 0;
//     sums enter from above unless the tile is in row 0; a tile in the last
//     column feeds its row carry-outs back into its own MSB column, any other
//     tile takes its left neighbour's column-0 sums there.
//   - two's complement: the leftmost cell column of last-column tiles and the
//     bottom cell row of last-row tiles negate their partial products (the
//     corner cell of the last tile does both and so is not negated); the
//     top-left tile adds the 2^(WA-1) term, the bottom-right tile the
//     2^(WB-1) term and the bottom-left tile the 2^(WA+WB-1) term (for square
//     operands the first two are the usual 2^W).
//   - signed-magnitude: the same edge tiles mask the sign bits, so the array
//     multiplies magnitudes as unsigned numbers.
//
// Purely combinational. With the default POS_W = 1, cin_ext reduces to col[0]
// and top_ext to row[0]: two outputs that are plain input bits, as intended.
// Decoding position and number system into the
// control signals inside the module follows the described scheme; the code
// format and the exact signal set are this design's own.
module bw_ctrl_decoder
  import bw_mult_pkg::*;
#(
  parameter int unsigned POS_W = 1
) (
  input  numsys_t            numsys,
  input  logic [POS_W-1:0]   row,
  input  logic [POS_W-1:0]   col,
  input  logic [POS_W-1:0]   last,
  output bw_ctrl_t           ctrl
);

  logic top, bottom, left, right, tc, sm;

  always_comb begin
    top    = (row == '0);
    bottom = (row == last);
    right  = (col == '0);
    left   = (col == last);
    tc     = (numsys == NS_TWOSCOMP);
    sm     = (numsys == NS_SIGNMAG);

    ctrl.cin_ext = !right;
    ctrl.top_ext = !top;
    ctrl.msb_own = left;
    ctrl.inv_col = tc & left;
    ctrl.inv_row = tc & bottom;
    ctrl.mask_a  = sm & left;
    ctrl.mask_b  = sm & bottom;
    ctrl.corr_a  = tc & top & left;
    ctrl.corr_b  = tc & bottom & right;
    ctrl.corr_hi = tc & bottom & left;
  end

endmodule
