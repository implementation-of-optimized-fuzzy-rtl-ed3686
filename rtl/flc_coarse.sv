// flc_coarse: coarse stage of the coarse-to-fine search defuzzifier.
//
// The crisp output is the point where the moments of the output terms on its
// left and on its right balance (the centre of gravity), found without a
// divider. Each output term j is a singleton at its centre c_j weighted by
// its area a_j = mu_j * span_j. A left index counts up from the first term
// and a right index counts down from the last. With LA the area at or left of
// the left index and LM their moment about the left centre (RA, RM likewise
// on the right), each cycle the side with the smaller moment advances by one
// term:  LM += LA * (c_li+1 - c_li);  LA += a_li+1  (or the mirror image).
// Since LM grows and RM shrinks with position, the indices meet at a term k
// next to the balance point, and the sign of LM - RM there (both are now
// complete moments about c_k) tells whether the point lies in [k, k+1] or in
// [k-1, k]. The moment and area of each side from before its last step are
// kept, so both ends of that interval are known and are handed to the fine
// stage. Moments are kept multiplied by 2^FINE_BITS so that the fine stage
// can add sub-steps of 1/2^FINE_BITS of an interval.
//
// Two multipliers form the areas and two the moment increments; adders,
// latches, an up-counter, a down-counter and a moment comparator complete the
// datapath, as in the source design. The stopping rule (indices meet, then
// pick the side) is this implementation's.
//
// Output term centres and spans are written through the table-write port:
// cfg.tbl = CFG_OUT_TERM, cfg.addr = term, cfg.data = {centre, span}.
// Centres must increase with the term index.
// Timing: start, one cycle to form the end areas, NY_TERMS-1 search steps,
// one decision cycle; done pulses with res valid (held until next start).
module flc_coarse
  import flc_pkg::*;
(
  input  logic                            clk,
  input  logic                            rst_n,
  input  cfg_wr_t                         cfg,
  input  logic                            start,
  input  logic [NY_TERMS-1:0][Q_BITS-1:0] mu_y,
  output logic                            busy,
  output logic                            done,
  output coarse_res_t                     res
);
  localparam logic [IDY_W-1:0] LAST = IDY_W'(NY_TERMS - 1);

  typedef enum logic [1:0] {S_IDLE, S_INIT, S_RUN} state_e;
  state_e state;

  logic [CTR_W-1:0]  centre [NY_TERMS];
  logic [SPAN_W-1:0] span   [NY_TERMS];

  logic [IDY_W-1:0]  li, ri;               // up-counter, down-counter
  logic [MOM_W-1:0]  lm, rm, plm, prm;     // moment latches and previous values
  logic [ASUM_W-1:0] la, ra, pla, pra;     // area latches and previous values

  logic [IDY_W-1:0]  lsel, rsel;           // term muxes feeding the area multipliers
  logic [AREA_W-1:0] a_l, a_r;             // area multipliers
  logic [CTR_W-1:0]  d_l, d_r;             // term intervals next to each index
  logic [MOM_W-1:0]  lm_inc, rm_inc;       // moment multipliers (x 2^F)
  logic              go_left;              // comparator: LM <= RM

  always_ff @(posedge clk) begin
    if (cfg.we && cfg.tbl == CFG_OUT_TERM && 32'(cfg.addr) < NY_TERMS) begin
      centre[cfg.addr[IDY_W-1:0]] <= cfg.data[SPAN_W +: CTR_W];
      span[cfg.addr[IDY_W-1:0]]   <= cfg.data[SPAN_W-1:0];
    end
  end

  always_comb begin
    lsel    = (state == S_INIT) ? li : li + 1'b1;
    rsel    = (state == S_INIT) ? ri : ri - 1'b1;
    a_l     = AREA_W'(mu_y[lsel] * span[lsel]);
    a_r     = AREA_W'(mu_y[rsel] * span[rsel]);
    d_l     = centre[li + 1'b1] - centre[li];
    d_r     = centre[ri] - centre[ri - 1'b1];
    lm_inc  = MOM_W'(la * d_l) << FINE_BITS;
    rm_inc  = MOM_W'(ra * d_r) << FINE_BITS;
    go_left = (lm <= rm);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      busy  <= 1'b0;
      done  <= 1'b0;
      li    <= '0;
      ri    <= '0;
      lm    <= '0;
      rm    <= '0;
      plm   <= '0;
      prm   <= '0;
      la    <= '0;
      ra    <= '0;
      pla   <= '0;
      pra   <= '0;
      res   <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_INIT;
          busy  <= 1'b1;
          li    <= '0;
          ri    <= LAST;
        end
        S_INIT: begin
          la    <= ASUM_W'(a_l);
          ra    <= ASUM_W'(a_r);
          lm    <= '0;
          rm    <= '0;
          plm   <= '0;
          prm   <= '0;
          pla   <= '0;
          pra   <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          if (li == ri) begin
            // both moments are complete about centre k = li = ri
            if (go_left && li != LAST) begin
              res.li <= li;
              res.ri <= li + 1'b1;
              res.lm <= lm;
              res.la <= la;
              res.rm <= prm;
              res.ra <= pra;
              res.lc <= centre[li];
              res.span_d <= centre[li + 1'b1] - centre[li];
            end else begin
              res.li <= li - 1'b1;
              res.ri <= li;
              res.lm <= plm;
              res.la <= pla;
              res.rm <= rm;
              res.ra <= ra;
              res.lc <= centre[li - 1'b1];
              res.span_d <= centre[li] - centre[li - 1'b1];
            end
            state <= S_IDLE;
            busy  <= 1'b0;
            done  <= 1'b1;
          end else if (go_left) begin
            plm <= lm;
            pla <= la;
            lm  <= lm + lm_inc;
            la  <= la + ASUM_W'(a_l);
            li  <= li + 1'b1;
          end else begin
            prm <= rm;
            pra <= ra;
            rm  <= rm + rm_inc;
            ra  <= ra + ASUM_W'(a_r);
            ri  <= ri - 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_order: assert property (@(posedge clk) disable iff (!rst_n)
                            state == S_RUN |-> li <= ri);

endmodule
