// Self-checking testbench for bw_ctrl_decoder. Every number system and every
// (row, col, last) position of concatenations up to 4 x 4 is applied; the
// expected control set is derived from which edges of the concatenation the
// tile lies on (top, bottom, left = most significant, right = least
// significant) and from the Baugh-Wooley rules for each number system.
module tb_bw_ctrl_decoder;
  import bw_mult_pkg::*;
  localparam int unsigned PW = 2;

  numsys_t        numsys;
  logic [PW-1:0]  row, col, last;
  bw_ctrl_t       ctrl, exp_ctrl;
  int checks = 0, failures = 0;

  bw_ctrl_decoder #(.POS_W(PW)) dut (.numsys(numsys), .row(row), .col(col), .last(last), .ctrl(ctrl));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ns = 0; ns < 3; ns++)
      for (int l = 0; l < 4; l++)
        for (int r = 0; r <= l; r++)
          for (int c = 0; c <= l; c++) begin
            bit is_top, is_bot, is_left, is_right, tc, sm;
            numsys = numsys_t'(ns);
            row = PW'(r); col = PW'(c); last = PW'(l);
            #1;
            is_top = (r == 0); is_bot = (r == l); is_left = (c == l); is_right = (c == 0);
            tc = (ns == 2); sm = (ns == 1);
            exp_ctrl.cin_ext = (c != 0);
            exp_ctrl.top_ext = (r != 0);
            exp_ctrl.msb_own = is_left;
            exp_ctrl.inv_col = tc && is_left;
            exp_ctrl.inv_row = tc && is_bot;
            exp_ctrl.mask_a  = sm && is_left;
            exp_ctrl.mask_b  = sm && is_bot;
            exp_ctrl.corr_a  = tc && is_top && is_left;
            exp_ctrl.corr_b  = tc && is_bot && is_right;
            exp_ctrl.corr_hi = tc && is_bot && is_left;
            checks++;
            if (ctrl !== exp_ctrl) begin
              failures++;
              $display("FAIL ns=%0d r=%0d c=%0d last=%0d: got %b expected %b", ns, r, c, l, ctrl, exp_ctrl);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
