// Self-checking testbench for bw_superior_mult, at every group size and in
// all three number systems:
//   - the default 2 x 2 concatenation of 3 x 3 modules (a 6 x 6 multiplier,
//     all operand pairs, or four 3 x 3 multipliers);
//   - a 3 x 3 concatenation of 2 x 2 modules (6 x 6 with middle tiles; a
//     2 x 2 group plus five leftover tiles);
//   - a 4 x 4 concatenation of 2 x 2 modules (8 x 8, 6 x 6 with leftovers,
//     four 4 x 4 groups, sixteen 2 x 2);
//   - a 2 x 2 concatenation of 4 x 4 modules (8 x 8, random operands);
//   - 2 x 2 concatenations of 3 x 2 and of 2 x 4 bit modules (6 x 4 and
//     4 x 8, unequal operand widths, all operand pairs).
module tb_bw_superior_mult;
  int   c[6], f[6];
  logic d[6];

  bw_superior_mult_check #(.NA(3), .NB(3), .M(2)) u_3x3m2 (.checks(c[0]), .failures(f[0]), .done(d[0]));
  bw_superior_mult_check #(.NA(2), .NB(2), .M(3)) u_2x2m3 (.checks(c[1]), .failures(f[1]), .done(d[1]));
  bw_superior_mult_check #(.NA(4), .NB(4), .M(2)) u_4x4m2 (.checks(c[2]), .failures(f[2]), .done(d[2]));
  bw_superior_mult_check #(.NA(3), .NB(2), .M(2)) u_3x2m2 (.checks(c[3]), .failures(f[3]), .done(d[3]));
  bw_superior_mult_check #(.NA(2), .NB(4), .M(2)) u_2x4m2 (.checks(c[4]), .failures(f[4]), .done(d[4]));
  bw_superior_mult_check #(.NA(2), .NB(2), .M(4)) u_2x2m4 (.checks(c[5]), .failures(f[5]), .done(d[5]));

  function automatic int total(int v[6]);
    int s = 0;
    for (int k = 0; k < 6; k++) s += v[k];
    return s;
  endfunction

  initial begin
    #10000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(c), total(f) + 1);
    $finish;
  end

  initial begin
    #1;
    wait (d[0] === 1'b1 && d[1] === 1'b1 && d[2] === 1'b1 && d[3] === 1'b1 && d[4] === 1'b1 && d[5] === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", total(c), total(f));
    $finish;
  end
endmodule
