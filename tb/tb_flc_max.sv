// tb_flc_max: random firing strengths and output term indices (often equal,
// so conflicts occur); checks every output membership against the maximum
// over the sub-rule bases naming that term, and the 2^NIN-cycle latency.
module tb_flc_max;
  import flc_pkg::*;
  localparam int NREG = 2 ** NIN;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  always #5 clk = ~clk;

  logic [NREG-1:0][Q_BITS-1:0] min_q;
  logic [NREG-1:0][IDY_W-1:0]  term_id;
  logic [NY_TERMS-1:0][Q_BITS-1:0] mu_y;
  logic busy, done;
  int checks = 0, failures = 0, conflicts = 0;

  flc_max dut (.clk(clk), .rst_n(rst_n), .start(start), .min_q(min_q), .term_id(term_id),
               .busy(busy), .done(done), .mu_y(mu_y));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, e, n;
    min_q = '0; term_id = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      for (int k = 0; k < NREG; k++) begin
        min_q[k]   = Q_BITS'($urandom);
        term_id[k] = IDY_W'($urandom_range((t % 2) ? 2 : NY_TERMS - 1));
      end
      @(posedge clk); #1; start = 1'b1;
      @(posedge clk); #1; start = 1'b0;
      cyc = 1;
      while (!done) begin @(posedge clk); #1; cyc++; end
      checks++;
      if (cyc != NREG + 1) begin failures++; $display("latency %0d", cyc); end
      for (int j = 0; j < NY_TERMS; j++) begin
        e = 0; n = 0;
        for (int k = 0; k < NREG; k++)
          if (int'(term_id[k]) == j) begin
            n++;
            if (int'(min_q[k]) > e) e = int'(min_q[k]);
          end
        if (n > 1) conflicts++;
        checks++;
        if (int'(mu_y[j]) != e) begin
          failures++;
          $display("test %0d term %0d: got %0d expected %0d", t, j, mu_y[j], e);
        end
      end
    end
    checks++;
    if (conflicts == 0) begin failures++; $display("no conflict exercised"); end
    $display("conflicts resolved: %0d", conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
