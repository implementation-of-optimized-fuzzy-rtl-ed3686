// tb_flc_fine_trace: replays a published fine-search trace. Starting from a
// left moment of 0x144 and a right moment of 0xC6, with left area x interval
// = 0x36 and right area x interval = 0x30 per sub-step, the moment latches
// must take the values
//   LM: 144 144 144 144 17A 17A 1B0
//   RM:  C6  F6 126 156 156 186 186
// in successive cycles (the side with the smaller moment advances), and the
// search must end three sub-steps into the interval. Areas 9 and 8 with an
// interval of 6 give the two products; the left centre is 0, so the crisp
// output is 3 * 6 = 18.
module tb_flc_fine_trace;
  import flc_pkg::*;

  localparam int LM_TRACE [7] = '{'h144, 'h144, 'h144, 'h144, 'h17A, 'h17A, 'h1B0};
  localparam int RM_TRACE [7] = '{'h0C6, 'h0F6, 'h126, 'h156, 'h156, 'h186, 'h186};

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  always #5 clk = ~clk;

  coarse_res_t cres;
  logic busy, done;
  logic [CTR_W+FINE_BITS-1:0] mep;
  int checks = 0, failures = 0;

  flc_fine dut (.clk(clk), .rst_n(rst_n), .start(start), .cres(cres),
                .busy(busy), .done(done), .mep(mep));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cres = '0;
    cres.lm = MOM_W'('h144);
    cres.rm = MOM_W'('h0C6);
    cres.la = ASUM_W'(9);
    cres.ra = ASUM_W'(8);
    cres.lc = '0;
    cres.span_d = CTR_W'(6);
    cres.li = '0;
    cres.ri = IDY_W'(1);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1; start = 1'b1;
    @(posedge clk); #1; start = 1'b0;
    for (int i = 0; i < 7; i++) begin
      checks++;
      if (int'(dut.lm) != LM_TRACE[i] || int'(dut.rm) != RM_TRACE[i]) begin
        failures++;
        $display("column %0d: LM %h RM %h, expected %h %h", i, dut.lm, dut.rm, LM_TRACE[i], RM_TRACE[i]);
      end
      @(posedge clk); #1;
    end
    while (!done) begin @(posedge clk); #1; end
    checks++;
    if (int'(mep) != 18 || int'(dut.p) != 3) begin
      failures++;
      $display("mep %0d at sub-step %0d, expected 18 at 3", mep, dut.p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
