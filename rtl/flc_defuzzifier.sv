// flc_defuzzifier: division-free defuzzifier built from a coarse and a fine
// search.
//
// The coarse stage walks the output terms from both ends toward the balance
// point of the left and right moments and hands the term interval that holds
// it, with the moments, areas and indices at its two ends, to the fine stage,
// which splits that interval into 2^FINE_BITS sub-steps and searches it the
// same way. The result approximates the centre of gravity of the output terms
// (singletons at their centres weighted by membership x span) to within one
// sub-step, using only multipliers, adders and comparators.
//
// Interface: coarse_start begins the coarse stage, coarse_done pulses when it
// ends; fine_start then begins the fine stage and fine_done pulses with theta
// valid. The sequencing belongs to the control module. Output term centres and
// spans are written through cfg (see flc_coarse).
module flc_defuzzifier
  import flc_pkg::*;
(
  input  logic                            clk,
  input  logic                            rst_n,
  input  cfg_wr_t                         cfg,
  input  logic                            coarse_start,
  input  logic                            fine_start,
  input  logic [NY_TERMS-1:0][Q_BITS-1:0] mu_y,
  output logic                            coarse_done,
  output logic                            fine_done,
  output logic [CTR_W+FINE_BITS-1:0]      theta
);
  coarse_res_t cres;
  logic        coarse_busy, fine_busy;

  flc_coarse u_coarse (
    .clk  (clk),
    .rst_n(rst_n),
    .cfg  (cfg),
    .start(coarse_start),
    .mu_y (mu_y),
    .busy (coarse_busy),
    .done (coarse_done),
    .res  (cres)
  );

  flc_fine u_fine (
    .clk  (clk),
    .rst_n(rst_n),
    .start(fine_start),
    .cres (cres),
    .busy (fine_busy),
    .done (fine_done),
    .mep  (theta)
  );

  // the fine stage may only start on a settled coarse result
  a_seq: assert property (@(posedge clk) disable iff (!rst_n)
                          fine_start |-> !coarse_busy);
  a_excl: assert property (@(posedge clk) disable iff (!rst_n)
                           !(coarse_busy && fine_busy));

endmodule
