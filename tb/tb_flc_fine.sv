// tb_flc_fine: random interval results (moments, areas, left centre,
// interval width). The balance point inside the interval, in sub-steps, is
//   u = (RM - LM + 2^F*RA*d) / ((LA+RA)*d), clipped to [0, 2^F];
// the crisp output must lie within one sub-step of c_L*2^F + u*d and on the
// sub-step grid, and the search must take 2^FINE_BITS+2 cycles.
module tb_flc_fine;
  import flc_pkg::*;
  localparam int STEPS = 2 ** FINE_BITS;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  always #5 clk = ~clk;

  coarse_res_t cres;
  logic busy, done;
  logic [CTR_W+FINE_BITS-1:0] mep;
  int checks = 0, failures = 0, n_left = 0, n_right = 0;

  flc_fine dut (.clk(clk), .rst_n(rst_n), .start(start), .cres(cres),
                .busy(busy), .done(done), .mep(mep));

  always @(posedge clk) if (busy && !dut.meet) begin
    if (dut.go_left) n_left++; else n_right++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real u, ideal;
    int cyc, lc, d;
    longint la, ra, lm, rm;
    cres = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      d  = 1 + int'($urandom_range(60));
      lc = int'($urandom_range(255 - d));
      la = longint'($urandom_range(20000)) + 1;
      ra = longint'($urandom_range(20000)) + 1;
      lm = longint'($urandom_range(400000)) * STEPS;
      rm = longint'($urandom_range(400000)) * STEPS;
      cres.la = ASUM_W'(la); cres.ra = ASUM_W'(ra);
      cres.lm = MOM_W'(lm);  cres.rm = MOM_W'(rm);
      cres.lc = CTR_W'(lc);  cres.span_d = CTR_W'(d);
      cres.li = '0; cres.ri = 1;
      @(posedge clk); #1; start = 1'b1;
      @(posedge clk); #1; start = 1'b0;
      cyc = 1;
      while (!done) begin @(posedge clk); #1; cyc++; end
      checks++;
      if (cyc != STEPS + 2) begin failures++; $display("latency %0d", cyc); end
      u = (real'(rm - lm) + real'(STEPS) * real'(ra) * d) / (real'(la + ra) * d);
      if (u < 0.0) u = 0.0;
      if (u > real'(STEPS)) u = real'(STEPS);
      ideal = real'(lc * STEPS) + u * d;
      checks++;
      if ((real'(mep) - ideal) > real'(d) + 1e-6 || (ideal - real'(mep)) > real'(d) + 1e-6 ||
          (int'(mep) - lc * STEPS) % d != 0) begin
        failures++;
        $display("test %0d: mep %0d ideal %f (d=%0d)", t, mep, ideal, d);
      end
    end
    checks++;
    if (n_left == 0 || n_right == 0) begin failures++; $display("one side never advanced"); end
    $display("left steps %0d, right steps %0d", n_left, n_right);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
