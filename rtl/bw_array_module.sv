// NA x NB parallel-parallel modified Baugh-Wooley array multiplier module
// with multiplexer-based data exchange interfaces.
//
// The module is a complete multiplier on its own, and also one tile of a
// larger (M*NA) x (M*NB) array built from M x M identical modules
// (bw_superior_mult). Cell (i, j) sits in row i (multiplier bit b[i],
// i < NB) and column j (multiplicand bit a[j], j < NA); its weight inside
// the module is 2^(i+j). Each row is a ripple-carry adder that adds the
// row's partial products to the partial sum of the row above, shifted one
// place right:
//
//   sum input of cell (i, j)   = sum of cell (i-1, j+1)        for j < NA-1
//                              = ext_msb[i-1]                   for j = NA-1
//   carry input of cell (i, 0) = cin_r[i] (right neighbour) or 0
//   ext_msb[i] = own carry-out of row i (leftmost tile / alone)
//              or left_in[i], the left neighbour's column-0 sum of row i
//
// The flow of sums and carries is tapped at the module edges, and
// multiplexers choose between the internal value (or 0) and the neighbour's
// value. Which way each multiplexer goes, which cells negate their partial
// product, which operand sign bits are masked and where the Baugh-Wooley
// correcting terms enter is set by the integrated bw_ctrl_decoder from the
// position code (row, col, last) and the number system. The correcting terms
// use inputs that are otherwise constant 0 in their tile:
//   2^(WA-1)     a 1 on the top-row MSB sum input of the top-left tile
//   2^(WB-1)     a 1 on the last-row carry input of the bottom-right tile
//   2^(WA+WB-1)  inversion of the final carry-out of the bottom-left tile
//
// Edge signals (bit index = cell row for the NB-bit ones, cell column for
// the NA-bit ones):
//   cin_r   in  NB: carry into column 0 of each row, from the right neighbour's cout_l
//   top_in  in  NA: sum inputs of the top row, from the module above's down
//   left_in in  NB: left neighbour's sum_r
//   cout_l  out NB: carry out of column NA-1 of each row
//   sum_r   out NB: column-0 sum of each row (a product bit in column-0 tiles)
//   down    out NA: bottom-row sums shifted one place, MSB = ext_msb[NB-1];
//                   in bottom-row tiles these are product bits
// Stand-alone, the product is p = {down, sum_r}; in signed-magnitude the
// sign bit of p is supplied outside (XOR of the operand signs).
//
// Timing: purely combinational; the critical path runs through NB ripple
// rows. The array organisation, the tapped interfaces, the special cells, the
// control decoder and the n1 x n2 operand option follow the described scheme;
// the ripple-carry row structure and the places where the correcting terms
// are injected are this design's own choices.
//
// Lint note: in a concatenation Verilator reports UNOPTFLAT (circular logic)
// on the edge vectors and on cell nets, because tile vectors feed each other
// in both directions. No bit depends on itself (row i of a tile needs only
// row i-1 of its left neighbour and row i of its right one), so it is not a
// real loop.
module bw_array_module
  import bw_mult_pkg::*;
#(
  parameter int unsigned NA    = 3,
  parameter int unsigned NB    = 3,
  parameter int unsigned POS_W = 1
) (
  input  numsys_t          numsys,
  input  logic [POS_W-1:0] row,
  input  logic [POS_W-1:0] col,
  input  logic [POS_W-1:0] last,
  input  logic [NA-1:0]    a,
  input  logic [NB-1:0]    b,
  input  logic [NB-1:0]    cin_r,
  input  logic [NA-1:0]    top_in,
  input  logic [NB-1:0]    left_in,
  output logic [NB-1:0]    cout_l,
  output logic [NB-1:0]    sum_r,
  output logic [NA-1:0]    down,
  output logic [NA+NB-1:0] p
);

  bw_ctrl_t ctrl;

  bw_ctrl_decoder #(.POS_W(POS_W)) u_dec (
    .numsys (numsys),
    .row    (row),
    .col    (col),
    .last   (last),
    .ctrl   (ctrl)
  );

  // Operands after sign-bit masking (signed-magnitude mode).
  logic [NA-1:0] a_m;
  logic [NB-1:0] b_m;
  always_comb begin
    a_m = a;
    b_m = b;
    if (ctrl.mask_a) a_m[NA-1] = 1'b0;
    if (ctrl.mask_b) b_m[NB-1] = 1'b0;
  end

  logic [NA-1:0] s [NB];   // s[i][j]: sum of cell (i, j)
  logic [NA-1:0] c [NB];   // c[i][j]: carry-out of cell (i, j)
  logic [NB-1:0] ext_msb;

  // MSB-column interface multiplexer.
  always_comb begin
    for (int i = 0; i < NB; i++)
      ext_msb[i] = ctrl.msb_own ? c[i][NA-1] : left_in[i];
  end

  for (genvar i = 0; i < NB; i++) begin : g_row
    for (genvar j = 0; j < NA; j++) begin : g_col
      logic y, ci, inv;

      // Partial product negation of the special cells.
      assign inv = (ctrl.inv_col && (j == NA-1)) ^ (ctrl.inv_row && (i == NB-1));

      // Sum input: top-row interface (with the 2^(WA-1) term at its MSB),
      // own row above, or MSB-column interface.
      if (i == 0 && j == NA-1) begin : g_top_msb
        assign y = ctrl.top_ext ? top_in[j] : ctrl.corr_a;
      end else if (i == 0) begin : g_top
        assign y = ctrl.top_ext ? top_in[j] : 1'b0;
      end else if (j < NA-1) begin : g_inner
        assign y = s[i-1][j+1];
      end else begin : g_msb
        assign y = ext_msb[i-1];
      end

      // Carry input: carry interface at column 0 (with the 2^(WB-1) term in
      // the last row), ripple elsewhere.
      if (j == 0 && i == NB-1) begin : g_cin_last
        assign ci = ctrl.cin_ext ? cin_r[i] : ctrl.corr_b;
      end else if (j == 0) begin : g_cin
        assign ci = ctrl.cin_ext ? cin_r[i] : 1'b0;
      end else begin : g_ripple
        assign ci = c[i][j-1];
      end

      bw_cell u_cell (
        .a      (a_m[j]),
        .b      (b_m[i]),
        .inv    (inv),
        .sum_in (y),
        .cin    (ci),
        .sum    (s[i][j]),
        .cout   (c[i][j])
      );
    end
  end

  always_comb begin
    for (int i = 0; i < NB; i++) begin
      cout_l[i] = c[i][NA-1];
      sum_r[i]  = s[i][0];
    end
    for (int j = 0; j < NA-1; j++)
      down[j] = s[NB-1][j+1];
    down[NA-1] = ext_msb[NB-1] ^ ctrl.corr_hi;
    p = {down, sum_r};
  end

endmodule
