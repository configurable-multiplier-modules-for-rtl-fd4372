// Stimulus and checking for one bw_array_module configuration, used by
// tb_bw_array_module. Two kinds of checks:
//   1. Stand-alone module (position 0/0/0), every operand pair, each number
//      system, with random values on the neighbour inputs, which must be
//      ignored. Expected: a*b unsigned, the two's complement product mod
//      2^(NA+NB), or the product of the magnitudes in signed-magnitude (the
//      product sign is formed outside the module).
//   2. Random tile positions inside concatenations, random operands and
//      neighbour inputs. The module must conserve weight: everything that
//      enters (partial products as the Baugh-Wooley rules define them for
//      this tile, neighbour sums and carries, correcting terms) equals
//      everything that leaves on sum_r, down and cout_l, each bit at its
//      weight in the tile.
// Raises done when finished and reports its counts on checks/failures.
module bw_array_module_check #(
  parameter int unsigned NA    = 3,
  parameter int unsigned NB    = 3,
  parameter int unsigned POS_W = 1,
  parameter int unsigned ITER  = 3000
) (
  output int  checks,
  output int  failures,
  output logic done
);
  import bw_mult_pkg::*;

  numsys_t          numsys;
  logic [POS_W-1:0] row, col, last;
  logic [NA-1:0]    a, top_in, down;
  logic [NB-1:0]    b, cin_r, left_in, cout_l, sum_r;
  logic [NA+NB-1:0] p;

  bw_array_module #(.NA(NA), .NB(NB), .POS_W(POS_W)) dut (
    .numsys(numsys), .row(row), .col(col), .last(last), .a(a), .b(b),
    .cin_r(cin_r), .top_in(top_in), .left_in(left_in),
    .cout_l(cout_l), .sum_r(sum_r), .down(down), .p(p)
  );

  function automatic longint sx(longint v, int w);
    return (v >= (longint'(1) << (w-1))) ? v - (longint'(1) << w) : v;
  endfunction

  initial begin
    longint mask2n;
    checks = 0; failures = 0; done = 0;
    mask2n = (longint'(1) << (NA+NB)) - 1;

    // 1. Stand-alone products.
    row = '0; col = '0; last = '0;
    for (int ns = 0; ns < 3; ns++)
      for (int va = 0; va < (1 << NA); va++)
        for (int vb = 0; vb < (1 << NB); vb++) begin
          longint expv;
          numsys = numsys_t'(ns);
          a = NA'(va); b = NB'(vb);
          cin_r = NB'($urandom); top_in = NA'($urandom); left_in = NB'($urandom);
          #1;
          case (ns)
            0: expv = longint'(va) * longint'(vb);
            1: expv = longint'(va % (1 << (NA-1))) * longint'(vb % (1 << (NB-1)));
            default: expv = (sx(va, NA) * sx(vb, NB)) & mask2n;
          endcase
          checks++;
          if (longint'(p) != expv) begin
            failures++;
            $display("FAIL %0dx%0d alone ns=%0d a=%0d b=%0d: got %0d expected %0d", NA, NB, ns, va, vb, p, expv);
          end
        end

    // 2. Weight conservation at random tile positions.
    for (int it = 0; it < ITER; it++) begin
      int l, r, c, ns;
      bit is_top, is_bot, is_left, is_right, tc, sm, ca, cb, chi;
      longint lhs, rhs;
      l  = $urandom_range((1 << POS_W) - 1);
      r  = $urandom_range(l);
      c  = $urandom_range(l);
      ns = $urandom_range(2);
      numsys = numsys_t'(ns);
      row = POS_W'(r); col = POS_W'(c); last = POS_W'(l);
      a = NA'($urandom); b = NB'($urandom);
      cin_r = NB'($urandom); top_in = NA'($urandom); left_in = NB'($urandom);
      is_top = (r == 0); is_bot = (r == l); is_left = (c == l); is_right = (c == 0);
      tc = (ns == 2); sm = (ns == 1);
      ca  = tc && is_top && is_left;
      cb  = tc && is_bot && is_right;
      chi = tc && is_bot && is_left;
      #1;
      lhs = 0;
      for (int i = 0; i < NB; i++)
        for (int j = 0; j < NA; j++) begin
          bit aj, bi, pp, ng;
          aj = a[j]; bi = b[i];
          if (sm && is_left && j == NA-1) aj = 0;
          if (sm && is_bot && i == NB-1) bi = 0;
          ng = (tc && is_left && j == NA-1) != (tc && is_bot && i == NB-1);
          pp = (aj & bi) ^ ng;
          lhs += longint'(pp) << (i + j);
        end
      for (int k = 0; k < NA; k++)
        if (!is_top) lhs += longint'(top_in[k]) << k;
      for (int k = 0; k < NB; k++) begin
        if (!is_right) lhs += longint'(cin_r[k]) << k;
        if (!is_left)  lhs += longint'(left_in[k]) << (k + NA);
      end
      if (ca) lhs += longint'(1) << (NA - 1);
      if (cb) lhs += longint'(1) << (NB - 1);
      rhs = 0;
      for (int k = 0; k < NB; k++) begin
        rhs += longint'(sum_r[k]) << k;
        if (!is_left) rhs += longint'(cout_l[k]) << (k + NA);
      end
      for (int k = 0; k < NA; k++)
        rhs += longint'(down[k]) << (k + NB);
      checks++;
      if (chi ? (((lhs + (longint'(1) << (NA+NB-1))) & mask2n) != (rhs & mask2n)) : (lhs != rhs)) begin
        failures++;
        $display("FAIL %0dx%0d pos r=%0d c=%0d last=%0d ns=%0d: in=%0d out=%0d", NA, NB, r, c, l, ns, lhs, rhs);
      end
      if (p !== {down, sum_r}) begin
        failures++;
        $display("FAIL %0dx%0d p is not {down, sum_r}", NA, NB);
      end
    end
    done = 1;
  end
endmodule
