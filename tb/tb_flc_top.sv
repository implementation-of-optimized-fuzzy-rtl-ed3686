// tb_flc_top: end-to-end test of the controller at its default sizes.
//
// It loads a complete two-input controller: seven triangular input terms per
// input (centres 8 + 40k, half-width 40, outer terms flat beyond their
// centres), a 7x7 rule base out = clamp(k1 + k2 - 3, 0, 6) split into the
// four sub-rule bases, and seven output terms with uneven centres and spans.
// It then sweeps both inputs over a grid and, for each step, compares with a
// model evaluated here over the full 7x7 rule base: the MIN/MAX result for
// every output term must match exactly, and the crisp output must lie within
// one sub-step of the centre of gravity. It counts the mechanisms of the
// design (MIN write-backs that lower a register, MAX conflicts, coarse left
// and right steps, fine left and right steps, and both interval choices) and
// fails if one never occurs. The first step alone is one complete operation.
module tb_flc_top;
  import flc_pkg::*;
  localparam int STEPS = 2 ** FINE_BITS;
  localparam int NREG  = 2 ** NIN;
  localparam int CELL_W = NIN * IDX_W;
  localparam int LEVELS = 2 ** P_BITS;
  localparam int MAXMU  = 2 ** Q_BITS - 1;
  localparam int OUT_C [NY_TERMS] = '{10, 50, 80, 128, 176, 206, 246};
  localparam int OUT_S [NY_TERMS] = '{60, 70, 60, 90, 60, 70, 60};
  // cycles from start to done: one per hand-over by the control module plus
  // the latency of each phase
  localparam int LATENCY = 5 + (NIN * NREG + 1) + (NREG + 1) + (NY_TERMS + 2) + (STEPS + 2);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  always #5 clk = ~clk;

  cfg_wr_t cfg;
  logic [NIN-1:0][P_BITS-1:0] x;
  logic busy, done;
  logic [CTR_W+FINE_BITS-1:0] theta;
  int checks = 0, failures = 0;
  int n_min_lower = 0, n_conflict = 0, n_cl = 0, n_cr = 0, n_fl = 0, n_fr = 0;
  int n_pick_r = 0, n_pick_l = 0;

  flc_top dut (.clk(clk), .rst_n(rst_n), .cfg(cfg), .start(start), .x(x),
               .busy(busy), .done(done), .theta(theta));

  // membership of input term k (0-based) at level v
  function automatic int mf(int k, int v);
    int e, dd;
    e = 8 + 40 * k;
    if ((k == 0 && v <= e) || (k == NX_TERMS - 1 && v >= e)) return MAXMU;
    dd = (v > e) ? v - e : e - v;
    if (dd >= 40) return 0;
    return (MAXMU * (40 - dd)) / 40;
  endfunction

  function automatic int rule(int k1, int k2);
    int o;
    o = k1 + k2 - 3;
    if (o < 0) o = 0;
    if (o > NY_TERMS - 1) o = NY_TERMS - 1;
    return o;
  endfunction

  task automatic wr(cfg_tbl_e tbl, int addr, int data);
    cfg.we = 1'b1; cfg.tbl = tbl;
    cfg.addr = CFG_ADDR_W'(addr); cfg.data = CFG_DATA_W'(data);
    @(posedge clk); #1;
    cfg.we = 1'b0;
  endtask

  task automatic load_tables();
    int mu, id, k1, k2;
    for (int v = 0; v < NIN; v++)
      for (int par = 0; par < 2; par++)
        for (int l = 0; l < LEVELS; l++) begin
          mu = 0; id = 0;
          // odd terms 1,3,5,7 are k = 0,2,4,6; even terms 2,4,6 are k = 1,3,5
          for (int k = par; k < NX_TERMS; k += 2)
            if (mf(k, l) > 0) begin mu = mf(k, l); id = k / 2; end
          wr(CFG_IN_LUT, (v << (P_BITS + 1)) | (par << P_BITS) | l, (id << Q_BITS) | mu);
        end
    for (int r = 0; r < NREG; r++)
      for (int i1 = 0; i1 < 2 ** IDX_W; i1++)
        for (int i2 = 0; i2 < 2 ** IDX_W; i2++) begin
          k1 = 2 * i1 + r[1];
          k2 = 2 * i2 + r[0];
          wr(CFG_RULE, (r << CELL_W) | (i1 << IDX_W) | i2,
             (k1 < NX_TERMS && k2 < NX_TERMS) ? rule(k1, k2) : 0);
        end
    for (int j = 0; j < NY_TERMS; j++) wr(CFG_OUT_TERM, j, (OUT_C[j] << SPAN_W) | OUT_S[j]);
  endtask

  // mechanism counters
  always @(posedge clk) begin
    if (dut.u_min.busy && dut.u_min.nxt < dut.u_min.cur) n_min_lower++;
    if (dut.u_defuzz.u_coarse.state == dut.u_defuzz.u_coarse.S_RUN &&
        dut.u_defuzz.u_coarse.li != dut.u_defuzz.u_coarse.ri) begin
      if (dut.u_defuzz.u_coarse.go_left) n_cl++; else n_cr++;
    end
    if (dut.u_defuzz.u_fine.busy && !dut.u_defuzz.u_fine.meet) begin
      if (dut.u_defuzz.u_fine.go_left) n_fl++; else n_fr++;
    end
    if (dut.u_defuzz.coarse_done) begin
      if (dut.u_defuzz.u_coarse.li == dut.u_defuzz.cres.li) n_pick_r++; else n_pick_l++;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_step(int x1, int x2);
    int mu_y [NY_TERMS];
    int s, o, cyc, k, d, hits [NY_TERMS];
    real tot, mom, cog, err;
    x[0] = P_BITS'(x1); x[1] = P_BITS'(x2);
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(posedge clk); #1; cyc++; end
    checks++;
    if (cyc != LATENCY) begin failures++; $display("latency %0d, expected %0d", cyc, LATENCY); end
    // model over the full rule base
    for (int j = 0; j < NY_TERMS; j++) begin mu_y[j] = 0; hits[j] = 0; end
    for (int k1 = 0; k1 < NX_TERMS; k1++)
      for (int k2 = 0; k2 < NX_TERMS; k2++) begin
        s = (mf(k1, x1) < mf(k2, x2)) ? mf(k1, x1) : mf(k2, x2);
        o = rule(k1, k2);
        if (s > 0) hits[o]++;
        if (s > mu_y[o]) mu_y[o] = s;
      end
    for (int j = 0; j < NY_TERMS; j++) if (hits[j] > 1) n_conflict++;
    tot = 0.0; mom = 0.0;
    for (int j = 0; j < NY_TERMS; j++) begin
      checks++;
      if (int'(dut.mu_y[j]) != mu_y[j]) begin
        failures++;
        $display("x=(%0d,%0d) term %0d: membership %0d expected %0d", x1, x2, j, dut.mu_y[j], mu_y[j]);
      end
      tot += real'(mu_y[j] * OUT_S[j]);
      mom += real'(mu_y[j] * OUT_S[j] * OUT_C[j]);
    end
    cog = mom / tot;
    k = 0;
    while (k < NY_TERMS - 2 && real'(OUT_C[k + 1]) < cog) k++;
    d = OUT_C[k + 1] - OUT_C[k];
    if (real'(OUT_C[k + 1]) == cog && k < NY_TERMS - 2 && OUT_C[k + 2] - OUT_C[k + 1] > d)
      d = OUT_C[k + 2] - OUT_C[k + 1];
    err = real'(theta) - cog * STEPS;
    checks++;
    if (err > real'(d) + 1e-6 || -err > real'(d) + 1e-6) begin
      failures++;
      $display("x=(%0d,%0d): theta %0d/%0d, centre of gravity %f", x1, x2, theta, STEPS, cog);
    end
  endtask

  initial begin
    int cases;
    cfg = '0; x = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    load_tables();
    @(posedge clk); #1;
    cases = 0;
    for (int x1 = 0; x1 < LEVELS; x1 += 7)
      for (int x2 = 3; x2 < LEVELS; x2 += 11) begin
        run_step(x1, x2);
        cases++;
      end
    checks++;
    if (n_min_lower == 0 || n_conflict == 0 || n_cl == 0 || n_cr == 0 ||
        n_fl == 0 || n_fr == 0 || n_pick_r == 0 || n_pick_l == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("%0d control steps; MIN lowered %0d, MAX conflicts %0d, coarse L/R %0d/%0d, fine L/R %0d/%0d, interval right/left of meeting %0d/%0d",
             cases, n_min_lower, n_conflict, n_cl, n_cr, n_fl, n_fr, n_pick_r, n_pick_l);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
