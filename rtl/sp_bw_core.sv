// Serial-parallel modified Baugh-Wooley multiplier array.
//
// A row of N basic cells (bw_cell), one per bit of the parallel operand b,
// each with a sum and a carry register. The multiplicand enters one bit per
// clock, LSB first, on a_ser; the product leaves one bit per clock, LSB
// first, on p_ser. In clock t cell i forms (a_t & b[i]) ^ inv and adds the
// sum stored by cell i+1 in the previous clock and its own stored carry, so
// a value handled by cell i in clock t has weight 2^(t+i). The top cell has
// no upper neighbour; its free sum input takes the serial correcting term
// corr_ser (a 1 there in clock t adds 2^(t+N-1)).
//
// Because the operand scheme is the same as in the parallel array, the
// partial product negation and the correcting term are supplied as serial
// control words, one bit per clock:
//   inv_lo_ser  negates the partial products of cells 0..N-2
//   inv_hi_ser  negates the partial product of cell N-1
//   corr_ser    adds a 1 into the top cell's sum input
// For an N x N two's complement product the caller drives inv_lo_ser = 1 in
// clock N-1, inv_hi_ser = 1 in clocks 0..N-2 and corr_ser = 1 in clocks 1
// and N (the terms 2^N and 2^(2N-1)); all are 0 for unsigned operands. The
// multiplicand must be followed by N zero bits: the 2N product bits appear in
// clocks 0..2N-1.
//
// Timing: p_ser is combinational from the inputs and the registered state
// of the same clock; en advances the state on the rising edge of clk; clr
// (synchronous, ahead of en) empties the sum and carry registers before a new
// product; rst_n is an asynchronous active-low reset. The row of cells with
// serial multiplicand and serial control/correction words follows the
// described scheme; the exact control word encoding and register placement
// are this design's own. Requires N >= 2.
module sp_bw_core #(
  parameter int unsigned N = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [N-1:0] b,
  input  logic         a_ser,
  input  logic         inv_lo_ser,
  input  logic         inv_hi_ser,
  input  logic         corr_ser,
  output logic         p_ser
);

  logic [N-1:0] sum_q, carry_q;
  logic [N-1:0] sum_d, carry_d;
  logic [N-1:0] y, inv;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      y[i]   = (i == N-1) ? corr_ser : sum_q[(i == N-1) ? i : i+1];
      inv[i] = (i == N-1) ? inv_hi_ser : inv_lo_ser;
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_cell
    bw_cell u_cell (
      .a      (a_ser),
      .b      (b[i]),
      .inv    (inv[i]),
      .sum_in (y[i]),
      .cin    (carry_q[i]),
      .sum    (sum_d[i]),
      .cout   (carry_d[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_q   <= '0;
      carry_q <= '0;
    end else if (clr) begin
      sum_q   <= '0;
      carry_q <= '0;
    end else if (en) begin
      sum_q   <= sum_d;
      carry_q <= carry_d;
    end
  end

  assign p_ser = sum_d[0];

endmodule
