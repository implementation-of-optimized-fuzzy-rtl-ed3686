// tb_flc_min: random memberships for both term sets of each input; checks that
// register r ends with the minimum over inputs of the membership from the set
// selected by r, that the loop takes NIN*2^NIN cycles after the preset cycle,
// and that the result holds while idle.
module tb_flc_min;
  import flc_pkg::*;
  localparam int NREG = 2 ** NIN;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  always #5 clk = ~clk;

  logic [NIN-1:0][Q_BITS-1:0] mu_odd, mu_even;
  logic busy, done;
  logic [NREG-1:0][Q_BITS-1:0] min_q;
  int checks = 0, failures = 0;

  flc_min dut (.clk(clk), .rst_n(rst_n), .start(start), .mu_odd(mu_odd), .mu_even(mu_even),
               .busy(busy), .done(done), .min_q(min_q));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, exp_v, m;
    mu_odd = '0; mu_even = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < NIN; i++) begin
        // mix of random, zero and full-scale memberships
        mu_odd[i]  = (t % 7 == 0) ? '1 : (t % 11 == 0) ? '0 : Q_BITS'($urandom);
        mu_even[i] = (t % 5 == 0) ? '1 : Q_BITS'($urandom);
      end
      @(posedge clk); #1; start = 1'b1;
      @(posedge clk); #1; start = 1'b0;
      cyc = 1;
      while (!done) begin @(posedge clk); #1; cyc++; end
      checks++;
      if (cyc != NIN * NREG + 1) begin
        failures++;
        $display("latency %0d, expected %0d", cyc, NIN * NREG + 1);
      end
      repeat (t % 3) @(posedge clk);
      #1;
      for (int r = 0; r < NREG; r++) begin
        exp_v = (1 << Q_BITS) - 1;
        for (int i = 0; i < NIN; i++) begin
          m = r[NIN-1-i] ? int'(mu_even[i]) : int'(mu_odd[i]);
          if (m < exp_v) exp_v = m;
        end
        checks++;
        if (int'(min_q[r]) != exp_v) begin
          failures++;
          $display("test %0d reg %0d: got %0d expected %0d", t, r, min_q[r], exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
