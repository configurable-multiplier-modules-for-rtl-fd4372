// Concatenation of M x M identical NA x NB Baugh-Wooley array modules into
// superior multipliers, with the word-length chosen at run time.
//
// grp_last = G-1 sets the group size G (1 <= G <= M; larger codes act as
// G = 1). The tiles are split into aligned G x G groups starting at tile
// (0, 0); tiles left over at the edge when G does not divide M work alone.
// Inside a group, tile (r', c') multiplies multiplicand slice c' by
// multiplier slice r': carries flow from each tile to its left neighbour,
// partial sums flow down and one place to the right, and each tile's MSB
// column takes the column-0 sums of its left neighbour. The module decoders
// close the edges at group borders, so a group is a (G*NA) x (G*NB)
// multiplier and precision grows in steps of the module size. G = 1 gives
// M*M independent NA x NB products. The default, NA = NB = 3 and M = 2,
// offers four 3 x 3 products (grp_last = 0) or one 6 x 6 product
// (grp_last = 1).
//
// Lanes: tile (r, c) owns lane k = r*M + c (a_lanes[k], b_lanes[k],
// p_lanes[k]). A group whose top-right tile is (R0, C0) takes its operands
// and delivers its product through the lanes of its top row, tiles (R0,
// C0+k) for k = 0 .. G-1, least significant first:
//   A = {a_lanes of (R0, C0+G-1), ..., a_lanes of (R0, C0)}
//   B = {b_lanes of (R0, C0+G-1), ..., b_lanes of (R0, C0)}
//   P = {p_lanes of (R0, C0+G-1), ..., p_lanes of (R0, C0)}   G*(NA+NB) bits
// The lanes of the group's other rows are unused; their p_lanes are 0. For
// G = 1 every lane is simply a_lanes[k] x b_lanes[k] -> p_lanes[k].
//
// numsys selects unsigned, signed-magnitude or two's complement for every
// product. In signed-magnitude the modules multiply the magnitudes and the
// product sign, the XOR of the operand signs, is put in the product MSB here,
// outside the modules.
//
// Timing: purely combinational. In a group the longest path crosses G*NB
// ripple rows. The tiling, the position-coded control, the run-time choice
// of word-length in steps of the module size and the external sign XOR
// follow the described scheme; the aligned square groups and the lane
// mapping are this design's own.
//
// Lint note: Verilator reports UNOPTFLAT (circular logic) on the tile edge
// vectors. Carries travel left and sums travel down, so tile vectors feed
// each other in both directions, but no bit depends on itself: row i of a tile
// needs only row i-1 of its left neighbour and row i of its right one. The
// warning is about Verilator's whole-vector scheduling, not a real loop.
module bw_superior_mult
  import bw_mult_pkg::*;
#(
  parameter int unsigned NA = 3,
  parameter int unsigned NB = 3,
  parameter int unsigned M  = 2,
  localparam int unsigned POS_W = (M > 1) ? $clog2(M) : 1
) (
  input  numsys_t                     numsys,
  input  logic [POS_W-1:0]            grp_last,
  input  logic [M*M-1:0][NA-1:0]      a_lanes,
  input  logic [M*M-1:0][NB-1:0]      b_lanes,
  output logic [M*M-1:0][NA+NB-1:0]   p_lanes
);

  localparam int unsigned PW = NA + NB;   // bits per product lane

  // Tile edge signals, indexed [row][col].
  logic [NB-1:0] t_cout_l [M][M];
  logic [NB-1:0] t_sum_r  [M][M];
  logic [NA-1:0] t_down   [M][M];
  logic [PW-1:0] t_p      [M][M];

  // Group size as a number, 1 .. M.
  int unsigned gsel;
  always_comb begin
    gsel = 1;
    for (int g = 1; g <= M; g++)
      if (grp_last == POS_W'(g - 1)) gsel = g;
  end

  for (genvar r = 0; r < M; r++) begin : g_r
    for (genvar c = 0; c < M; c++) begin : g_c
      logic [POS_W-1:0] pos_row, pos_col, pos_last;
      logic [NA-1:0]    a_t, top_t;
      logic [NB-1:0]    b_t, cin_t, left_t;

      // Position and operand selection for the chosen group size.
      always_comb begin
        pos_row  = '0;
        pos_col  = '0;
        pos_last = '0;
        a_t      = a_lanes[r*M + c];
        b_t      = b_lanes[r*M + c];
        for (int g = 2; g <= M; g++) begin
          if (gsel == g && (r / g) < (M / g) && (c / g) < (M / g)) begin
            pos_row  = POS_W'(r % g);
            pos_col  = POS_W'(c % g);
            pos_last = POS_W'(g - 1);
            a_t      = a_lanes[(r / g) * g * M + (c / g) * g + (c % g)];
            b_t      = b_lanes[(r / g) * g * M + (c / g) * g + (r % g)];
          end
        end
      end

      // Neighbour connections; tiles at the array edge get 0, which their
      // decoders ignore.
      if (c > 0) begin : g_cin
        assign cin_t = t_cout_l[r][c-1];
      end else begin : g_cin0
        assign cin_t = '0;
      end
      if (r > 0) begin : g_top
        assign top_t = t_down[r-1][c];
      end else begin : g_top0
        assign top_t = '0;
      end
      if (c < M-1) begin : g_left
        assign left_t = t_sum_r[r][c+1];
      end else begin : g_left0
        assign left_t = '0;
      end

      bw_array_module #(.NA(NA), .NB(NB), .POS_W(POS_W)) u_mod (
        .numsys  (numsys),
        .row     (pos_row),
        .col     (pos_col),
        .last    (pos_last),
        .a       (a_t),
        .b       (b_t),
        .cin_r   (cin_t),
        .top_in  (top_t),
        .left_in (left_t),
        .cout_l  (t_cout_l[r][c]),
        .sum_r   (t_sum_r[r][c]),
        .down    (t_down[r][c]),
        .p       (t_p[r][c])
      );
    end
  end

  // Product assembly: for every group (a single tile is a group of 1) the low
  // G*NB bits come from the column-0 sums of its right column, the high G*NA
  // bits from the down outputs of its bottom row; the result is spread over
  // the lanes of the group's top row. Signed-magnitude puts the sign in the
  // group product's MSB.
  logic [M*PW-1:0] gp;
  always_comb begin
    p_lanes = '0;
    gp      = '0;
    for (int g = 1; g <= M; g++) begin
      if (gsel == g) begin
        for (int r0 = 0; r0 < M; r0 += g) begin
          for (int c0 = 0; c0 < M; c0 += g) begin
            // Tiles beyond the last full group (or all, for g = 1) work alone.
            for (int rr = 0; rr < g; rr++) begin
              for (int cc = 0; cc < g; cc++) begin
                if ((g == 1 || r0 + g > M || c0 + g > M) && r0 + rr < M && c0 + cc < M) begin
                  p_lanes[(r0 + rr) * M + c0 + cc] = t_p[r0 + rr][c0 + cc];
                  if (numsys == NS_SIGNMAG)
                    p_lanes[(r0 + rr) * M + c0 + cc][PW-1] =
                      a_lanes[(r0 + rr) * M + c0 + cc][NA-1] ^ b_lanes[(r0 + rr) * M + c0 + cc][NB-1];
                end
              end
            end
            if (g > 1 && r0 + g <= M && c0 + g <= M) begin
              gp = '0;
              for (int k = 0; k < g; k++) begin
                gp[k*NB +: NB]        = t_sum_r[r0 + k][c0];
                gp[g*NB + k*NA +: NA] = t_down[r0 + g - 1][c0 + k];
              end
              if (numsys == NS_SIGNMAG)
                gp[g*PW - 1] = a_lanes[r0*M + c0 + g - 1][NA-1] ^ b_lanes[r0*M + c0 + g - 1][NB-1];
              for (int k = 0; k < g; k++)
                p_lanes[r0*M + c0 + k] = gp[k*PW +: PW];
            end
          end
        end
      end
    end
  end

endmodule
