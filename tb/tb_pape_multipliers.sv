// End-to-end testbench of pape_multipliers at its default size (3 x 3 bit
// modules, 2 x 2 concatenation, 3-bit serial-parallel unit); it sets no
// parameter of the top.
//
// Two threads run at the same time:
//   - the parallel array gets a new random operation every clock: joined
//     (group size 2: one 6 x 6 product in lanes 1..0) or separate (group
//     size 1: four 3 x 3 products), in a random number system, so the
//     configuration switches at run time between consecutive operations;
//   - the serial-parallel unit runs a stream of random products, issuing the
//     next start in the clock of done and raising start while busy now and
//     then (it must be ignored); each product must arrive exactly 6 clocks
//     after its start.
// All results are compared with integer arithmetic. The testbench counts how
// often each mechanism happened (joined and separate operation in each number
// system, switches in both directions, back-to-back and ignored starts,
// serial products in each number system) and counts a failure for any that
// never did.
module tb_pape_multipliers;
  import bw_mult_pkg::*;
  localparam int unsigned N = 3;
  localparam int unsigned M = 2;
  localparam int unsigned W = M * N;
  localparam int unsigned NPAR = 3000;
  localparam int unsigned NSP  = 300;

  logic clk = 1'b0;
  logic rst_n;
  numsys_t                 par_numsys, sp_numsys;
  logic                    par_joined;
  logic [0:0]              par_grp_last;
  logic [M*M-1:0][N-1:0]   par_a_lanes, par_b_lanes;
  logic [M*M-1:0][2*N-1:0] par_p_lanes;
  logic                    sp_start, sp_busy, sp_done;
  logic [N-1:0]            sp_a, sp_b;
  logic [2*N-1:0]          sp_p;

  int checks = 0, failures = 0;
  int n_joined[3], n_sep[3], n_sp[3];
  int n_to_sep = 0, n_to_joined = 0, n_b2b = 0, n_ignored = 0, n_overlap = 0;
  bit par_done = 0, sp_fin = 0;

  always #5 clk = ~clk;

  assign par_grp_last = par_joined;

  pape_multipliers dut (
    .clk(clk), .rst_n(rst_n),
    .par_numsys(par_numsys), .par_grp_last(par_grp_last),
    .par_a_lanes(par_a_lanes), .par_b_lanes(par_b_lanes),
    .par_p_lanes(par_p_lanes),
    .sp_start(sp_start), .sp_numsys(sp_numsys), .sp_a(sp_a), .sp_b(sp_b),
    .sp_busy(sp_busy), .sp_done(sp_done), .sp_p(sp_p)
  );

  initial begin
    repeat (20000) @(posedge clk);
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

  // Parallel array thread.
  initial begin
    bit prev_joined;
    par_numsys = NS_UNSIGNED; par_joined = 1'b0; par_a_lanes = '0; par_b_lanes = '0;
    prev_joined = 1'b0;
    wait (rst_n === 1'b1);
    for (int it = 0; it < NPAR; it++) begin
      int ns;
      @(negedge clk);
      ns = $urandom_range(2);
      par_numsys  = numsys_t'(ns);
      par_joined  = $urandom_range(1) == 1;
      for (int k = 0; k < M*M; k++) begin
        par_a_lanes[k] = N'($urandom);
        par_b_lanes[k] = N'($urandom);
      end
      #1;
      if (sp_busy) n_overlap++;
      if (it > 0 && par_joined && !prev_joined) n_to_joined++;
      if (it > 0 && !par_joined && prev_joined) n_to_sep++;
      prev_joined = par_joined;
      if (par_joined) begin
        longint x, y, e, got;
        x = 0; y = 0; got = 0;
        for (int k = 0; k < M; k++) begin
          x   |= longint'(par_a_lanes[k]) << (k*N);
          y   |= longint'(par_b_lanes[k]) << (k*N);
          got |= longint'(par_p_lanes[k]) << (k*2*N);
        end
        e = ref_mul(x, y, W, ns);
        n_joined[ns]++;
        checks++;
        if (got != e) begin
          failures++;
          $display("FAIL joined ns=%0d %0d*%0d: got %0d expected %0d", ns, x, y, got, e);
        end
      end else begin
        n_sep[ns]++;
        for (int k = 0; k < M*M; k++) begin
          longint e;
          e = ref_mul(longint'(par_a_lanes[k]), longint'(par_b_lanes[k]), N, ns);
          checks++;
          if (longint'(par_p_lanes[k]) != e) begin
            failures++;
            $display("FAIL lane %0d ns=%0d: got %0d expected %0d", k, ns, par_p_lanes[k], e);
          end
        end
      end
    end
    par_done = 1;
  end

  // Serial-parallel thread.
  initial begin
    rst_n = 1'b0; sp_start = 1'b0; sp_numsys = NS_UNSIGNED; sp_a = '0; sp_b = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(negedge clk);
    for (int it = 0; it < NSP; it++) begin
      int ns, lat, x, y;
      longint e;
      ns = $urandom_range(2); x = $urandom_range(7); y = $urandom_range(7);
      if (sp_done) n_b2b++;
      sp_start = 1'b1; sp_numsys = numsys_t'(ns); sp_a = N'(x); sp_b = N'(y);
      @(negedge clk);
      lat = 0;
      // Sometimes keep start high with other operands while busy.
      if ($urandom_range(3) == 0) begin
        sp_a = N'($urandom); sp_b = N'($urandom); sp_numsys = numsys_t'((ns + 1) % 3);
        n_ignored++;
      end else begin
        sp_start = 1'b0;
      end
      while (!sp_done && lat < 40) begin
        @(negedge clk);
        lat++;
        sp_start = 1'b0;
      end
      e = ref_mul(x, y, N, ns);
      n_sp[ns]++;
      checks++;
      if (longint'(sp_p) != e || lat != 2*N) begin
        failures++;
        $display("FAIL serial ns=%0d %0d*%0d: got %0d expected %0d latency %0d", ns, x, y, sp_p, e, lat);
      end
      // Now and then leave a gap before the next start.
      if ($urandom_range(3) == 0) @(negedge clk);
    end
    sp_fin = 1;
  end

  task automatic need(string what, int n);
    checks++;
    $display("  %-34s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    wait (par_done && sp_fin);
    $display("mechanism counts:");
    need("joined 6x6, unsigned",            n_joined[0]);
    need("joined 6x6, signed-magnitude",    n_joined[1]);
    need("joined 6x6, two's complement",    n_joined[2]);
    need("separate 4 x 3x3, unsigned",      n_sep[0]);
    need("separate 4 x 3x3, signed-magn.",  n_sep[1]);
    need("separate 4 x 3x3, two's compl.",  n_sep[2]);
    need("switch separate -> joined",       n_to_joined);
    need("switch joined -> separate",       n_to_sep);
    need("serial product, unsigned",        n_sp[0]);
    need("serial product, signed-magn.",    n_sp[1]);
    need("serial product, two's compl.",    n_sp[2]);
    need("serial start in clock of done",   n_b2b);
    need("serial start ignored while busy", n_ignored);
    need("parallel op while serial busy",   n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
