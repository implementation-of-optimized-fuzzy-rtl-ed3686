// flc_top: NIN-input, single-output fuzzy logic controller.
//
// A control step samples the crisp inputs and runs four phases:
//  * fuzzification by lookup: each input addresses its odd-term and
//    even-term tables (flc_input_lut), giving at most two active terms;
//  * Min & Inference: a read-modify-write MIN loop (flc_min) forms the firing
//    strength of each of the 2^NIN sub-rule bases while the decomposed rule
//    base (flc_inference) gives each one's output term;
//  * Max: a read-modify-write MAX loop (flc_max) merges strengths that name
//    the same output term;
//  * defuzzification by a coarse-to-fine moment-balance search
//    (flc_defuzzifier), which needs no divider.
// flc_control sequences the phases.
//
// Interface: all tables are loaded through cfg before use (see flc_pkg for
// the encoding). A start pulse while idle samples x; done pulses when theta
// holds the crisp output, in units of 1/2^FINE_BITS of the output universe.
// Latency from start to done: 5 hand-over cycles of the control module plus
// (NIN*2^NIN + 1) MIN + (2^NIN + 1) MAX + (NY_TERMS + 2) coarse +
// (2^FINE_BITS + 2) fine cycles, 38 cycles at the default sizes.
module flc_top
  import flc_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  input  cfg_wr_t                      cfg,
  input  logic                         start,
  input  logic [NIN-1:0][P_BITS-1:0]   x,
  output logic                         busy,
  output logic                         done,
  output logic [CTR_W+FINE_BITS-1:0]   theta
);
  logic [NIN-1:0][P_BITS-1:0]     x_q;
  logic [NIN-1:0][Q_BITS-1:0]     mu_odd, mu_even;
  logic [NIN-1:0][IDX_W-1:0]      id_odd, id_even;
  logic [2**NIN-1:0][Q_BITS-1:0]  min_q;
  logic [2**NIN-1:0][IDY_W-1:0]   term_id;
  logic [NY_TERMS-1:0][Q_BITS-1:0] mu_y;
  logic min_start, max_start, coarse_start, fine_start;
  logic min_done, max_done, coarse_done, fine_done;
  logic min_busy, max_busy;

  // crisp inputs are held for the whole control step
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              x_q <= '0;
    else if (start && !busy) x_q <= x;
  end

  for (genvar i = 0; i < NIN; i++) begin : g_lut
    flc_input_lut #(
      .VAR(i)
    ) u_lut (
      .clk    (clk),
      .cfg    (cfg),
      .x      (x_q[i]),
      .mu_odd (mu_odd[i]),
      .mu_even(mu_even[i]),
      .id_odd (id_odd[i]),
      .id_even(id_even[i])
    );
  end

  flc_control u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (start),
    .min_done    (min_done),
    .max_done    (max_done),
    .coarse_done (coarse_done),
    .fine_done   (fine_done),
    .min_start   (min_start),
    .max_start   (max_start),
    .coarse_start(coarse_start),
    .fine_start  (fine_start),
    .busy        (busy),
    .done        (done)
  );

  flc_min u_min (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (min_start),
    .mu_odd (mu_odd),
    .mu_even(mu_even),
    .busy   (min_busy),
    .done   (min_done),
    .min_q  (min_q)
  );

  flc_inference u_inf (
    .clk    (clk),
    .rst_n  (rst_n),
    .cfg    (cfg),
    .load   (min_start),
    .id_odd (id_odd),
    .id_even(id_even),
    .term_id(term_id)
  );

  flc_max u_max (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (max_start),
    .min_q  (min_q),
    .term_id(term_id),
    .busy   (max_busy),
    .done   (max_done),
    .mu_y   (mu_y)
  );

  flc_defuzzifier u_defuzz (
    .clk         (clk),
    .rst_n       (rst_n),
    .cfg         (cfg),
    .coarse_start(coarse_start),
    .fine_start  (fine_start),
    .mu_y        (mu_y),
    .coarse_done (coarse_done),
    .fine_done   (fine_done),
    .theta       (theta)
  );

  // the MIN and MAX loops never overlap
  a_phases: assert property (@(posedge clk) disable iff (!rst_n)
                             !(min_busy && max_busy));

endmodule
