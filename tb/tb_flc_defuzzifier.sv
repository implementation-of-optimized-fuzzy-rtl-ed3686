// tb_flc_defuzzifier: runs coarse then fine search on random output
// memberships with random spans and increasing centres, and checks that the
// crisp output is within one sub-step (interval/2^FINE_BITS) of the centre of
// gravity sum(mu*span*c)/sum(mu*span) computed here with a division
// (of either neighbouring interval when it falls exactly on a centre).
module tb_flc_defuzzifier;
  import flc_pkg::*;
  localparam int STEPS = 2 ** FINE_BITS;

  logic clk = 1'b0, rst_n = 1'b0, coarse_start = 1'b0, fine_start = 1'b0;
  always #5 clk = ~clk;

  cfg_wr_t cfg;
  logic [NY_TERMS-1:0][Q_BITS-1:0] mu_y;
  logic coarse_done, fine_done;
  logic [CTR_W+FINE_BITS-1:0] theta;
  int checks = 0, failures = 0;
  int c [NY_TERMS];
  int s [NY_TERMS];

  flc_defuzzifier dut (.clk(clk), .rst_n(rst_n), .cfg(cfg), .coarse_start(coarse_start),
                       .fine_start(fine_start), .mu_y(mu_y), .coarse_done(coarse_done),
                       .fine_done(fine_done), .theta(theta));

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real cog, err;
    longint tot, mom;
    int pos, d, k;
    cfg = '0; mu_y = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      if (t % 40 == 0) begin
        pos = int'($urandom_range(20));
        for (int j = 0; j < NY_TERMS; j++) begin
          c[j] = pos;
          pos += 1 + int'($urandom_range(34));
          s[j] = 1 + int'($urandom_range(254));
          cfg.we = 1'b1; cfg.tbl = CFG_OUT_TERM; cfg.addr = CFG_ADDR_W'(j);
          cfg.data = CFG_DATA_W'((c[j] << SPAN_W) | s[j]);
          @(posedge clk); #1;
        end
        cfg.we = 1'b0;
      end
      tot = 0;
      while (tot == 0) begin
        tot = 0; mom = 0;
        for (int j = 0; j < NY_TERMS; j++) begin
          mu_y[j] = ($urandom_range(1) == 0) ? '0 : Q_BITS'($urandom);
          tot += longint'(mu_y[j]) * s[j];
          mom += longint'(mu_y[j]) * s[j] * c[j];
        end
      end
      @(posedge clk); #1; coarse_start = 1'b1;
      @(posedge clk); #1; coarse_start = 1'b0;
      while (!coarse_done) begin @(posedge clk); #1; end
      fine_start = 1'b1;
      @(posedge clk); #1; fine_start = 1'b0;
      while (!fine_done) begin @(posedge clk); #1; end
      cog = real'(mom) / real'(tot);
      // width of the term interval holding the centre of gravity
      k = 0;
      while (k < NY_TERMS - 2 && real'(c[k + 1]) < cog) k++;
      d = c[k + 1] - c[k];
      // on a centre the neighbouring interval may be the one searched
      if (real'(c[k + 1]) == cog && k < NY_TERMS - 2 && c[k + 2] - c[k + 1] > d) d = c[k + 2] - c[k + 1];
      err = real'(theta) - cog * STEPS;
      checks++;
      if (err > real'(d) + 1e-6 || -err > real'(d) + 1e-6) begin
        failures++;
        $display("test %0d: theta %0d/%0d, cog %f", t, theta, STEPS, cog);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
