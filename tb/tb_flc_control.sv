// tb_flc_control: answers each phase start with a done after a random delay
// and checks that the phases run in the order Min, Max, Coarse, Fine, each
// started once by a one-cycle pulse only after the previous phase finished,
// that busy covers the step, that done follows the fine phase, and that a
// start while busy is ignored.
module tb_flc_control;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  always #5 clk = ~clk;

  logic min_done = 1'b0, max_done = 1'b0, coarse_done = 1'b0, fine_done = 1'b0;
  logic min_start, max_start, coarse_start, fine_start, busy, done;
  int checks = 0, failures = 0;

  flc_control dut (.clk(clk), .rst_n(rst_n), .start(start), .min_done(min_done),
                   .max_done(max_done), .coarse_done(coarse_done), .fine_done(fine_done),
                   .min_start(min_start), .max_start(max_start), .coarse_start(coarse_start),
                   .fine_start(fine_start), .busy(busy), .done(done));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // wait for the expected start pulse; no other start or done may appear
  task automatic expect_phase(input int ph, input int delay);
    logic [3:0] st;
    int n;
    st = {min_start, max_start, coarse_start, fine_start};
    n = 0;
    while (st == 0 && n < 5) begin
      @(posedge clk); #1;
      st = {min_start, max_start, coarse_start, fine_start};
      n++;
    end
    checks++;
    if (st != 4'b1000 >> ph) begin
      failures++;
      $display("phase %0d: starts %b", ph, st);
    end
    repeat (delay) begin
      @(posedge clk); #1;
      checks++;
      if ({min_start, max_start, coarse_start, fine_start} != 0 || done || !busy) begin
        failures++;
        $display("phase %0d: unexpected activity", ph);
      end
    end
    case (ph)
      0: min_done = 1'b1;
      1: max_done = 1'b1;
      2: coarse_done = 1'b1;
      default: fine_done = 1'b1;
    endcase
    @(posedge clk); #1;
    {min_done, max_done, coarse_done, fine_done} = '0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    checks++;
    if (busy || done) begin failures++; $display("busy after reset"); end
    for (int t = 0; t < 200; t++) begin
      start = 1'b1;
      @(posedge clk); #1;
      start = 1'b0;
      checks++;
      if (!busy || !min_start) begin failures++; $display("step %0d did not start", t); end
      // min_start is visible now: answer it, then the rest
      repeat ($urandom_range(6)) begin
        @(posedge clk); #1;
        if (t % 4 == 0) start = 1'b1;       // ignored while busy
      end
      start = 1'b0;
      min_done = 1'b1;
      @(posedge clk); #1;
      min_done = 1'b0;
      expect_phase(1, int'($urandom_range(6)));
      expect_phase(2, int'($urandom_range(6)));
      expect_phase(3, int'($urandom_range(6)));
      checks++;
      if (!done || busy) begin failures++; $display("step %0d: no done", t); end
      @(posedge clk); #1;
      checks++;
      if (done || busy) begin failures++; $display("step %0d: done not a pulse", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
