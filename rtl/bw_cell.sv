// Basic cell of the Baugh-Wooley array multipliers.
//
// The cell forms the partial product bit a & b, optionally negates it
// (the configurable partial product inversion of the special cells in a
// modified Baugh-Wooley array; with inv = 0 the cell is an ordinary array
// multiplier cell) and adds it to a sum input and a carry input with a full
// adder. Purely combinational.
//
// Ports: a, b operand bits; inv negates the partial product; sum_in is the
// partial sum arriving from the previous row (or the free input of a row
// used for a correcting term); cin is the carry input; sum and cout are the
// full adder outputs.
//
// The cell content (partial product, sum and carry, configurable negation)
// follows the described scheme; a plain ripple full adder is this design's
// choice of adder.
//
// Lint: in a joined array Verilator may name this cell's cout in an
// UNOPTFLAT (circular logic) warning. The cell itself has no loop; the
// warning comes from the edge vectors between tiles, which carry signals in
// both directions (see bw_array_module and bw_superior_mult). It stands.
module bw_cell (
  input  logic a,
  input  logic b,
  input  logic inv,
  input  logic sum_in,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic pp;

  always_comb begin
    pp   = (a & b) ^ inv;
    sum  = pp ^ sum_in ^ cin;
    cout = (pp & sum_in) | (pp & cin) | (sum_in & cin);
  end

endmodule
