// Serial-parallel N x N multiplier for unsigned, signed-magnitude and two's
// complement operands, built on sp_bw_core.
//
// On start (while idle) the unit stores the parallel operand b, loads the
// multiplicand a into a shift register that shifts it out LSB first and
// fills with zeros, and loads three 2N-bit control shift registers with the
// serial words that sp_bw_core needs for the chosen number system (partial
// product negation of the ordinary cells and of the top cell, and the
// correcting term). These shift registers are what the serial-parallel
// scheme pays for its small cell count. Then, for 2N clocks, one
// multiplicand bit and one bit of each control word go into the core and one
// product bit comes out and is shifted into the product register.
//
// Signed-magnitude operands have their sign bits cleared before they enter
// the array and the product sign, the XOR of the two operand signs, is placed
// in p[2N-1] outside the array.
//
// Interface: start is taken when busy = 0; busy is high during the 2N
// computing clocks; done is a one-clock pulse in the clock after the last
// computing clock, when p holds the product (p is held until the next
// product completes). Start at rising edge E0 -> done high after edge E0+2N,
// i.e. 2N clock periods per product and a new start can be taken in the
// same clock as done. rst_n is an asynchronous active-low reset.
//
// The serial multiplicand, the serial control vector and correcting term,
// their shift registers and the 2N clock periods per product follow the
// described scheme; the start/busy/done handshake is this design's own.
module sp_bw_multiplier
  import bw_mult_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  numsys_t        numsys,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic           busy,
  output logic           done,
  output logic [2*N-1:0] p
);

  localparam int unsigned CW = $clog2(2*N + 1);

  logic [N-1:0]   a_sr, b_q;
  logic [2*N-1:0] inv_lo_sr, inv_hi_sr, corr_sr;
  logic [2*N-2:0] p_sr;   // product bits of the clocks before the last
  logic [CW-1:0]  cnt;
  logic           sign_q, sm_q;
  logic           core_clr, core_p;
  logic           load;

  // Serial control words for an N x N product (bit t is used in clock t).
  logic [2*N-1:0] w_inv_lo, w_inv_hi, w_corr;
  logic [N-1:0]   a_in, b_in;
  always_comb begin
    w_inv_lo = '0;
    w_inv_hi = '0;
    w_corr   = '0;
    if (numsys == NS_TWOSCOMP) begin
      w_inv_lo[N-1] = 1'b1;
      for (int t = 0; t < N-1; t++) w_inv_hi[t] = 1'b1;
      w_corr[1] = 1'b1;
      w_corr[N] = 1'b1;
    end
    a_in = a;
    b_in = b;
    if (numsys == NS_SIGNMAG) begin
      a_in[N-1] = 1'b0;
      b_in[N-1] = 1'b0;
    end
  end

  assign load     = start && !busy;
  assign core_clr = load;

  sp_bw_core #(.N(N)) u_core (
    .clk        (clk),
    .rst_n      (rst_n),
    .clr        (core_clr),
    .en         (busy),
    .b          (b_q),
    .a_ser      (a_sr[0]),
    .inv_lo_ser (inv_lo_sr[0]),
    .inv_hi_ser (inv_hi_sr[0]),
    .corr_ser   (corr_sr[0]),
    .p_ser      (core_p)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_sr      <= '0;
      b_q       <= '0;
      inv_lo_sr <= '0;
      inv_hi_sr <= '0;
      corr_sr   <= '0;
      p_sr      <= '0;
      p         <= '0;
      cnt       <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
      sign_q    <= 1'b0;
      sm_q      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (load) begin
        a_sr      <= a_in;
        b_q       <= b_in;
        inv_lo_sr <= w_inv_lo;
        inv_hi_sr <= w_inv_hi;
        corr_sr   <= w_corr;
        sign_q    <= a[N-1] ^ b[N-1];
        sm_q      <= (numsys == NS_SIGNMAG);
        cnt       <= '0;
        busy      <= 1'b1;
      end else if (busy) begin
        a_sr      <= a_sr >> 1;
        inv_lo_sr <= inv_lo_sr >> 1;
        inv_hi_sr <= inv_hi_sr >> 1;
        corr_sr   <= corr_sr >> 1;
        p_sr      <= {core_p, p_sr[2*N-2:1]};
        cnt       <= cnt + 1'b1;
        if (cnt == CW'(2*N - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          p    <= {sm_q ? sign_q : core_p, p_sr};
        end
      end
    end
  end

  // A start is never taken while a product is being computed.
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !load);
  // Exactly 2N computing clocks: done follows the last one.
  assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);

endmodule
