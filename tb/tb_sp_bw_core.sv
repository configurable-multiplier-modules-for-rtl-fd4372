// Self-checking testbench for sp_bw_core, the serial-parallel Baugh-Wooley
// array. The testbench itself plays the shift registers: for every operand
// pair of a 3-bit and of a 4-bit core, in unsigned and two's complement, it
// feeds the multiplicand LSB first followed by zeros, together with the
// serial negation and correction words, and collects one product bit per
// clock. The product must be complete after exactly 2N clocks and equal the
// integer product (mod 2^(2N) for two's complement).
module tb_sp_bw_core;
  logic clk = 1'b0;
  logic rst_n;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Per-width harness signals.
  logic       clr3, en3, a3, il3, ih3, co3, p3;
  logic [2:0] b3;
  logic       clr4, en4, a4, il4, ih4, co4, p4;
  logic [3:0] b4;

  sp_bw_core #(.N(3)) dut3 (.clk(clk), .rst_n(rst_n), .clr(clr3), .en(en3), .b(b3),
    .a_ser(a3), .inv_lo_ser(il3), .inv_hi_ser(ih3), .corr_ser(co3), .p_ser(p3));
  sp_bw_core #(.N(4)) dut4 (.clk(clk), .rst_n(rst_n), .clr(clr4), .en(en4), .b(b4),
    .a_ser(a4), .inv_lo_ser(il4), .inv_hi_ser(ih4), .corr_ser(co4), .p_ser(p4));

  function automatic longint ref_mul(longint x, longint y, int w, bit tc);
    longint half;
    half = longint'(1) << (w-1);
    if (!tc) return x * y;
    return (((x >= half) ? x - 2*half : x) * ((y >= half) ? y - 2*half : y)) & ((longint'(1) << (2*w)) - 1);
  endfunction

  initial begin
    rst_n = 1'b0;
    {clr3, en3, a3, il3, ih3, co3, b3} = '0;
    {clr4, en4, a4, il4, ih4, co4, b4} = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int tc = 0; tc < 2; tc++) begin
      // 3-bit core
      for (int x = 0; x < 8; x++)
        for (int y = 0; y < 8; y++) begin
          longint got;
          int cyc;
          @(negedge clk); clr3 = 1'b1; en3 = 1'b0; b3 = 3'(y);
          @(negedge clk); clr3 = 1'b0;
          got = 0; cyc = 0;
          for (int t = 0; t < 6; t++) begin
            en3 = 1'b1;
            a3  = (t < 3) ? x[t] : 1'b0;
            il3 = tc && (t == 2);
            ih3 = tc && (t < 2);
            co3 = tc && (t == 1 || t == 3);
            #1 got |= longint'(p3) << t;
            cyc++;
            @(negedge clk);
          end
          en3 = 1'b0;
          checks++;
          if (got != ref_mul(x, y, 3, tc[0]) || cyc != 6) begin
            failures++;
            $display("FAIL N=3 tc=%0d %0d*%0d: got %0d expected %0d", tc, x, y, got, ref_mul(x, y, 3, tc[0]));
          end
        end
      // 4-bit core
      for (int x = 0; x < 16; x++)
        for (int y = 0; y < 16; y++) begin
          longint got;
          @(negedge clk); clr4 = 1'b1; en4 = 1'b0; b4 = 4'(y);
          @(negedge clk); clr4 = 1'b0;
          got = 0;
          for (int t = 0; t < 8; t++) begin
            en4 = 1'b1;
            a4  = (t < 4) ? x[t] : 1'b0;
            il4 = tc && (t == 3);
            ih4 = tc && (t < 3);
            co4 = tc && (t == 1 || t == 4);
            #1 got |= longint'(p4) << t;
            @(negedge clk);
          end
          en4 = 1'b0;
          checks++;
          if (got != ref_mul(x, y, 4, tc[0])) begin
            failures++;
            $display("FAIL N=4 tc=%0d %0d*%0d: got %0d expected %0d", tc, x, y, got, ref_mul(x, y, 4, tc[0]));
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
