// flc_fine: fine stage of the coarse-to-fine search defuzzifier.
//
// The coarse stage delivers one term interval [c_L, c_R] that contains the
// balance point, the left moment LM about c_L with the area LA of all terms at
// or left of c_L, and the right moment RM about c_R with the area RA at or
// right of c_R. Inside the interval no term is crossed, so moving the left
// point one sub-step (1/2^FINE_BITS of the interval) to the right adds
// LA * interval to LM, and moving the right point one sub-step left adds
// RA * interval to RM (moments are scaled by 2^FINE_BITS). A left up-counter
// starts at 0 and a right down-counter at 2^FINE_BITS; every cycle the side
// whose moment is smaller (left on a tie) advances, the other adder adding 0.
// When the counters are equal their value is the sub-step of the moment
// equilibrium point and the crisp output is latched:
//   mep = c_L * 2^FINE_BITS + position * (c_R - c_L),
// i.e. the crisp value in units of 1/2^FINE_BITS, within one sub-step of the
// centre of gravity. The registers, 0/area multiplexers, adders, comparators,
// counters and MEP latch follow the source design; the counter start values
// and the tie rule are this implementation's.
//
// Timing: start loads the coarse result and clears the MEP latch, then
// 2^FINE_BITS steps and one latch cycle; done pulses with mep valid, and mep
// holds until the next start.
module flc_fine
  import flc_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  coarse_res_t                 cres,
  output logic                        busy,
  output logic                        done,
  output logic [CTR_W+FINE_BITS-1:0]  mep
);
  localparam int unsigned CNT_W = FINE_BITS + 1;

  logic [ASUM_W-1:0] la_q, ra_q;        // LEFT AREA / RIGHT AREA registers
  logic [MOM_W-1:0]  lm, rm;            // moment latches
  logic [CNT_W-1:0]  p, q;              // left up-counter, right down-counter
  logic [CTR_W-1:0]  lc, span_d;
  logic [MOM_W-1:0]  l_add, r_add;      // 0 / area multiplexers
  logic              go_left, meet;

  always_comb begin
    go_left = (lm <= rm);
    meet    = (p == q);
    l_add   = go_left ? MOM_W'(la_q * span_d) : '0;
    r_add   = go_left ? '0 : MOM_W'(ra_q * span_d);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      la_q <= '0;
      ra_q <= '0;
      lm   <= '0;
      rm   <= '0;
      p    <= '0;
      q    <= '0;
      lc   <= '0;
      span_d <= '0;
      mep  <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        la_q <= cres.la;
        ra_q <= cres.ra;
        lm   <= cres.lm;
        rm   <= cres.rm;
        lc   <= cres.lc;
        span_d <= cres.span_d;
        p    <= '0;
        q    <= CNT_W'(2 ** FINE_BITS);
        mep  <= '0;                     // MEP latch cleared for the new search
      end else if (busy) begin
        if (meet) begin
          mep  <= ((CTR_W+FINE_BITS)'(lc) << FINE_BITS) +
                  (CTR_W+FINE_BITS)'(p * span_d);
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          lm <= lm + l_add;
          rm <= rm + r_add;
          if (go_left) p <= p + 1'b1;
          else         q <= q - 1'b1;
        end
      end
    end
  end

  // the coarse stage hands over two neighbouring terms
  a_interval: assert property (@(posedge clk) disable iff (!rst_n)
                               start |-> cres.ri == cres.li + 1'b1);

  a_counters: assert property (@(posedge clk) disable iff (!rst_n)
                               busy |-> p <= q);

endmodule
