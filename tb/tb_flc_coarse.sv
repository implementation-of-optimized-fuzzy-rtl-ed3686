// tb_flc_coarse: random output memberships, spans and increasing centres.
// For every search it checks, against sums computed here, that the chosen
// interval [c_li, c_ri] holds the centre of gravity, that the moments and
// areas handed on are exactly those of the terms at or beyond each end
// (moments scaled by 2^FINE_BITS), and the search latency NY_TERMS+2. It
// counts left and right steps and both outcomes of the final decision.
module tb_flc_coarse;
  import flc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  always #5 clk = ~clk;

  cfg_wr_t cfg;
  logic [NY_TERMS-1:0][Q_BITS-1:0] mu_y;
  logic busy, done;
  coarse_res_t res;
  int checks = 0, failures = 0;
  int c [NY_TERMS];
  int s [NY_TERMS];
  int n_left = 0, n_right = 0, n_pick_right = 0, n_pick_left = 0;

  flc_coarse dut (.clk(clk), .rst_n(rst_n), .cfg(cfg), .start(start), .mu_y(mu_y),
                  .busy(busy), .done(done), .res(res));

  always @(posedge clk) if (busy && dut.state == dut.S_RUN && dut.li != dut.ri) begin
    if (dut.go_left) n_left++; else n_right++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_terms();
    int pos;
    pos = int'($urandom_range(20));
    for (int j = 0; j < NY_TERMS; j++) begin
      c[j] = pos;
      pos += 1 + int'($urandom_range(34));
      s[j] = int'($urandom_range(255));
      cfg.we = 1'b1; cfg.tbl = CFG_OUT_TERM; cfg.addr = CFG_ADDR_W'(j);
      cfg.data = CFG_DATA_W'((c[j] << SPAN_W) | s[j]);
      @(posedge clk); #1;
    end
    cfg.we = 1'b0;
  endtask

  initial begin
    longint a [NY_TERMS];
    longint tot, mom, la, ra, lm, rm;
    int cyc, li, ri;
    cfg = '0; mu_y = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      if (t % 50 == 0) load_terms();
      tot = 0;
      while (tot == 0) begin
        tot = 0; mom = 0;
        for (int j = 0; j < NY_TERMS; j++) begin
          mu_y[j] = ($urandom_range(2) == 0) ? '0 : Q_BITS'($urandom);
          a[j] = longint'(mu_y[j]) * s[j];
          tot += a[j];
          mom += a[j] * c[j];
        end
      end
      @(posedge clk); #1; start = 1'b1;
      @(posedge clk); #1; start = 1'b0;
      cyc = 1;
      while (!done) begin @(posedge clk); #1; cyc++; end
      checks++;
      if (cyc != NY_TERMS + 2) begin failures++; $display("latency %0d", cyc); end
      li = int'(res.li); ri = int'(res.ri);
      checks++;
      if (ri != li + 1 || ri >= NY_TERMS || int'(res.lc) != c[li] ||
          int'(res.span_d) != c[ri] - c[li]) begin
        failures++;
        $display("test %0d: bad interval li=%0d ri=%0d lc=%0d d=%0d", t, li, ri, res.lc, res.span_d);
        continue;
      end
      // the centre of gravity mom/tot lies in [c_li, c_ri]
      checks++;
      if (longint'(c[li]) * tot > mom || longint'(c[ri]) * tot < mom) begin
        failures++;
        $display("test %0d: cog %f outside [%0d,%0d]", t, real'(mom) / real'(tot), c[li], c[ri]);
      end
      la = 0; ra = 0; lm = 0; rm = 0;
      for (int j = 0; j <= li; j++) begin la += a[j]; lm += a[j] * (c[li] - c[j]); end
      for (int j = ri; j < NY_TERMS; j++) begin ra += a[j]; rm += a[j] * (c[j] - c[ri]); end
      checks++;
      if (longint'(res.la) != la || longint'(res.ra) != ra ||
          longint'(res.lm) != lm * (2 ** FINE_BITS) || longint'(res.rm) != rm * (2 ** FINE_BITS)) begin
        failures++;
        $display("test %0d: la %0d/%0d ra %0d/%0d lm %0d/%0d rm %0d/%0d", t,
                 res.la, la, res.ra, ra, res.lm, lm * 8, res.rm, rm * 8);
      end
      // which side of the meeting term was chosen
      if (dut.li == res.li) n_pick_right++; else n_pick_left++;
    end
    checks++;
    if (n_left == 0 || n_right == 0 || n_pick_left == 0 || n_pick_right == 0) begin
      failures++;
      $display("mechanism not exercised");
    end
    $display("left steps %0d, right steps %0d, interval right of meeting %0d, left of meeting %0d",
             n_left, n_right, n_pick_right, n_pick_left);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
