// Self-checking testbench for bw_array_module: the default 3 x 3 module, a
// 4 x 4 module with room for 4 x 4 concatenations, and two modules with
// unequal operand widths (3 x 2 and 2 x 4), each exercised by
// bw_array_module_check (stand-alone products and weight conservation at
// every kind of tile position).
module tb_bw_array_module;
  int   c[4], f[4];
  logic d[4];

  bw_array_module_check #(.NA(3), .NB(3), .POS_W(1)) u_3x3 (.checks(c[0]), .failures(f[0]), .done(d[0]));
  bw_array_module_check #(.NA(4), .NB(4), .POS_W(2)) u_4x4 (.checks(c[1]), .failures(f[1]), .done(d[1]));
  bw_array_module_check #(.NA(3), .NB(2), .POS_W(2)) u_3x2 (.checks(c[2]), .failures(f[2]), .done(d[2]));
  bw_array_module_check #(.NA(2), .NB(4), .POS_W(1)) u_2x4 (.checks(c[3]), .failures(f[3]), .done(d[3]));

  function automatic int total(int v[4]);
    return v[0] + v[1] + v[2] + v[3];
  endfunction

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(c), total(f) + 1);
    $finish;
  end

  initial begin
    #1;
    wait (d[0] === 1'b1 && d[1] === 1'b1 && d[2] === 1'b1 && d[3] === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", total(c), total(f));
    $finish;
  end
endmodule
