// Stimulus and checking for one bw_superior_mult configuration, used by
// tb_bw_superior_mult. For the full M x M group (grp_last = M-1): every
// operand pair of the (M*NA) x (M*NB) multiplier when that is at most 2^16
// pairs, else ITER random pairs, in each number system. For every group size
// G = 1 .. M: ITER random sets of lane operands in each number system, with
// each aligned G x G group and each leftover tile checked. Expected values
// are computed here with integer arithmetic: unsigned product, two's
// complement product mod 2^(WA+WB), or signed-magnitude {sign XOR,
// magnitude product}; lanes of a group outside its top row must read 0.
module bw_superior_mult_check #(
  parameter int unsigned NA   = 3,
  parameter int unsigned NB   = 3,
  parameter int unsigned M    = 2,
  parameter int unsigned ITER = 2000
) (
  output int   checks,
  output int   failures,
  output logic done
);
  import bw_mult_pkg::*;
  localparam int unsigned WA = M * NA;
  localparam int unsigned WB = M * NB;
  localparam int unsigned PW = NA + NB;
  localparam int unsigned POS_W = (M > 1) ? $clog2(M) : 1;

  numsys_t                    numsys;
  logic [POS_W-1:0]           grp_last;
  logic [M*M-1:0][NA-1:0]     a_lanes;
  logic [M*M-1:0][NB-1:0]     b_lanes;
  logic [M*M-1:0][NA+NB-1:0]  p_lanes;

  bw_superior_mult #(.NA(NA), .NB(NB), .M(M)) dut (
    .numsys(numsys), .grp_last(grp_last), .a_lanes(a_lanes), .b_lanes(b_lanes),
    .p_lanes(p_lanes)
  );

  // Reference product of a wx-bit and a wy-bit word in number system ns,
  // wx+wy bits.
  function automatic longint ref_mul(longint x, longint y, int wx, int wy, int ns);
    longint hx, hy, mask, sx, sy;
    hx = longint'(1) << (wx-1);
    hy = longint'(1) << (wy-1);
    mask = (longint'(1) << (wx+wy)) - 1;
    case (ns)
      0: return x * y;
      1: return ((longint'((x >= hx) != (y >= hy))) << (wx+wy-1)) | ((x % hx) * (y % hy));
      default: begin
        sx = (x >= hx) ? x - 2*hx : x;
        sy = (y >= hy) ? y - 2*hy : y;
        return (sx * sy) & mask;
      end
    endcase
  endfunction

  task automatic check_joined(longint x, longint y, int ns);
    longint e, got;
    grp_last = POS_W'(M - 1);
    numsys = numsys_t'(ns);
    for (int k = 0; k < M*M; k++) begin
      a_lanes[k] = NA'($urandom);
      b_lanes[k] = NB'($urandom);
    end
    for (int k = 0; k < M; k++) begin
      a_lanes[k] = NA'(x >> (k*NA));
      b_lanes[k] = NB'(y >> (k*NB));
    end
    #1;
    e = ref_mul(x, y, WA, WB, ns);
    got = 0;
    for (int k = 0; k < M; k++) got |= longint'(p_lanes[k]) << (k*PW);
    checks++;
    if (got != e) begin
      failures++;
      if (failures < 20)
        $display("FAIL %0dx%0d M=%0d joined ns=%0d %0d*%0d: got %0d expected %0d", NA, NB, M, ns, x, y, got, e);
    end
  endtask

  initial begin
    checks = 0; failures = 0; done = 0;
    for (int ns = 0; ns < 3; ns++) begin
      if (WA + WB <= 16) begin
        for (int x = 0; x < (1 << WA); x++)
          for (int y = 0; y < (1 << WB); y++)
            check_joined(longint'(x), longint'(y), ns);
      end else begin
        for (int it = 0; it < ITER; it++)
          check_joined(longint'({$urandom, $urandom}) & ((longint'(1) << WA) - 1),
                       longint'({$urandom, $urandom}) & ((longint'(1) << WB) - 1), ns);
      end
      // Every group size, random lane operands.
      for (int g = 1; g <= M; g++)
        for (int it = 0; it < ITER / M; it++) begin
          grp_last = POS_W'(g - 1);
          numsys = numsys_t'(ns);
          for (int k = 0; k < M*M; k++) begin
            a_lanes[k] = NA'($urandom);
            b_lanes[k] = NB'($urandom);
          end
          #1;
          for (int r0 = 0; r0 < M; r0 += g)
            for (int c0 = 0; c0 < M; c0 += g) begin
              if (g > 1 && r0 + g <= M && c0 + g <= M) begin
                longint x, y, e, got;
                x = 0; y = 0; got = 0;
                for (int k = 0; k < g; k++) begin
                  x   |= longint'(a_lanes[r0*M + c0 + k]) << (k*NA);
                  y   |= longint'(b_lanes[r0*M + c0 + k]) << (k*NB);
                  got |= longint'(p_lanes[r0*M + c0 + k]) << (k*PW);
                end
                e = ref_mul(x, y, g*NA, g*NB, ns);
                checks++;
                if (got != e) begin
                  failures++;
                  if (failures < 20)
                    $display("FAIL %0dx%0d M=%0d G=%0d group (%0d,%0d) ns=%0d %0d*%0d: got %0d expected %0d",
                             NA, NB, M, g, r0, c0, ns, x, y, got, e);
                end
                for (int rr = 1; rr < g; rr++)
                  for (int cc = 0; cc < g; cc++) begin
                    checks++;
                    if (p_lanes[(r0 + rr)*M + c0 + cc] != '0) begin
                      failures++;
                      $display("FAIL %0dx%0d M=%0d G=%0d unused lane not 0", NA, NB, M, g);
                    end
                  end
              end else begin
                for (int rr = 0; rr < g; rr++)
                  for (int cc = 0; cc < g; cc++)
                    if (r0 + rr < M && c0 + cc < M) begin
                      int k;
                      longint e;
                      k = (r0 + rr)*M + c0 + cc;
                      e = ref_mul(longint'(a_lanes[k]), longint'(b_lanes[k]), NA, NB, ns);
                      checks++;
                      if (longint'(p_lanes[k]) != e) begin
                        failures++;
                        if (failures < 20)
                          $display("FAIL %0dx%0d M=%0d G=%0d lane %0d ns=%0d %0d*%0d: got %0d expected %0d",
                                   NA, NB, M, g, k, ns, a_lanes[k], b_lanes[k], p_lanes[k], e);
                      end
                    end
              end
            end
        end
    end
    done = 1;
  end
endmodule
