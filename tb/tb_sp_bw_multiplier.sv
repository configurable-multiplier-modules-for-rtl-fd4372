// Self-checking testbench for sp_bw_multiplier. Every operand pair of the
// default 3-bit unit is multiplied in each number system; the product is
// compared with integer arithmetic (unsigned, signed-magnitude {sign XOR,
// magnitude product}, two's complement mod 2^6) and done must come exactly
// 2N = 6 clocks after the clock that took start. Starts are issued
// back-to-back in the clock of done, and a start raised while busy must be
// ignored.
module tb_sp_bw_multiplier;
  import bw_mult_pkg::*;
  localparam int unsigned N = 3;

  logic clk = 1'b0;
  logic rst_n, start, busy, done;
  numsys_t numsys;
  logic [N-1:0] a, b;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0;
  int ignored_starts = 0;

  always #5 clk = ~clk;

  sp_bw_multiplier dut (.clk(clk), .rst_n(rst_n), .start(start), .numsys(numsys),
    .a(a), .b(b), .busy(busy), .done(done), .p(p));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_mul(longint x, longint y, int w, int ns);
    longint half;
    half = longint'(1) << (w-1);
    case (ns)
      0: return x * y;
      1: return ((longint'((x >= half) != (y >= half))) << (2*w-1)) | ((x % half) * (y % half));
      default: return (((x >= half) ? x - 2*half : x) * ((y >= half) ? y - 2*half : y))
                      & ((longint'(1) << (2*w)) - 1);
    endcase
  endfunction

  initial begin
    rst_n = 1'b0; start = 1'b0; numsys = NS_UNSIGNED; a = '0; b = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(negedge clk);
    for (int ns = 0; ns < 3; ns++)
      for (int x = 0; x < (1 << N); x++)
        for (int y = 0; y < (1 << N); y++) begin
          int lat;
          longint e;
          // Issue start (the clock may already carry done of the previous product).
          start = 1'b1; numsys = numsys_t'(ns); a = N'(x); b = N'(y);
          @(negedge clk);
          // While busy, present a different start that must be ignored.
          a = ~N'(x); b = ~N'(y); numsys = numsys_t'((ns + 1) % 3);
          lat = 0;
          if (x == 1) ignored_starts++;
          else start = 1'b0;
          while (!done && lat < 50) begin
            @(negedge clk);
            lat++;
            if (lat == 2) start = 1'b0;
          end
          e = ref_mul(x, y, N, ns);
          checks++;
          if (longint'(p) != e || lat != 2*N) begin
            failures++;
            $display("FAIL ns=%0d %0d*%0d: got %0d expected %0d, latency %0d", ns, x, y, p, e, lat);
          end
        end
    checks++;
    if (ignored_starts == 0) begin
      failures++;
      $display("FAIL no start was presented while busy");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
