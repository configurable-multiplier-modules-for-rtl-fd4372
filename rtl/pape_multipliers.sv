// Multiplier resources of a processing-accelerator processing element (PE)
// in a coarse-grain reconfigurable array: the two realisations of the
// configurable modified Baugh-Wooley multiplier, side by side.
//
//   par_*  bw_superior_mult: M x M concatenable NA x NB parallel-parallel
//          array modules. par_grp_last = G-1 joins them into aligned G x G
//          groups, each a (G*NA) x (G*NB) multiplier whose operands and
//          product use the lanes of the group's top row; G = 1 gives M*M
//          independent NA x NB multipliers. Default: 3 x 3 modules, M = 2,
//          so four 3 x 3 products (par_grp_last = 0) or one 6 x 6 product
//          in lanes 1..0 (par_grp_last = 1).
//          Combinational: a product is valid in the cycle its operands are.
//   sp_*   sp_bw_multiplier: an SP_N x SP_N serial-parallel multiplier
//          with a start/busy/done handshake, 2*SP_N clock periods per
//          product (default SP_N = 3).
//
// Both take the number system (unsigned, signed-magnitude, two's
// complement) per operation, so word-length and representation are chosen
// at run time. In the full system the operands, the configuration codes and
// the results would be routed through the configurable switch layer; here
// they are ports. clk and rst_n (asynchronous, active low) clock only the
// serial-parallel unit.
//
// The two realisations and their run-time configuration follow the
// described scheme; putting both into one PE and the port grouping are this
// design's own choices.
module pape_multipliers
  import bw_mult_pkg::*;
#(
  parameter int unsigned NA   = 3,
  parameter int unsigned NB   = 3,
  parameter int unsigned M    = 2,
  parameter int unsigned SP_N = 3,
  localparam int unsigned POS_W = (M > 1) ? $clog2(M) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // Concatenable parallel array
  input  numsys_t                   par_numsys,
  input  logic [POS_W-1:0]          par_grp_last,
  input  logic [M*M-1:0][NA-1:0]    par_a_lanes,
  input  logic [M*M-1:0][NB-1:0]    par_b_lanes,
  output logic [M*M-1:0][NA+NB-1:0] par_p_lanes,
  // Serial-parallel multiplier
  input  logic                      sp_start,
  input  numsys_t                   sp_numsys,
  input  logic [SP_N-1:0]           sp_a,
  input  logic [SP_N-1:0]           sp_b,
  output logic                      sp_busy,
  output logic                      sp_done,
  output logic [2*SP_N-1:0]         sp_p
);

  bw_superior_mult #(.NA(NA), .NB(NB), .M(M)) u_par (
    .numsys   (par_numsys),
    .grp_last (par_grp_last),
    .a_lanes  (par_a_lanes),
    .b_lanes  (par_b_lanes),
    .p_lanes  (par_p_lanes)
  );

  sp_bw_multiplier #(.N(SP_N)) u_sp (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (sp_start),
    .numsys (sp_numsys),
    .a      (sp_a),
    .b      (sp_b),
    .busy   (sp_busy),
    .done   (sp_done),
    .p      (sp_p)
  );

endmodule
