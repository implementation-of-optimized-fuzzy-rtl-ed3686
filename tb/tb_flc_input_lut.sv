// tb_flc_input_lut: fills the odd and even tables of variable 1 with random
// entries (and variable 0's with others, which must not disturb them), then
// reads every level back and compares membership and id with a model array.
module tb_flc_input_lut;
  import flc_pkg::*;
  localparam int LEVELS = 2 ** P_BITS;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  cfg_wr_t cfg;
  logic [P_BITS-1:0] x;
  logic [Q_BITS-1:0] mu_odd, mu_even;
  logic [IDX_W-1:0]  id_odd, id_even;
  int checks = 0, failures = 0;

  logic [Q_BITS-1:0] m_mu [2][LEVELS];
  logic [IDX_W-1:0]  m_id [2][LEVELS];

  flc_input_lut #(.VAR(1)) dut (
    .clk(clk), .cfg(cfg), .x(x),
    .mu_odd(mu_odd), .mu_even(mu_even), .id_odd(id_odd), .id_even(id_even)
  );

  task automatic wr(input int v, input int par, input int lvl, input int id, input int mu);
    cfg.we   = 1'b1;
    cfg.tbl  = CFG_IN_LUT;
    cfg.addr = CFG_ADDR_W'((v << (P_BITS + 1)) | (par << P_BITS) | lvl);
    cfg.data = CFG_DATA_W'((id << Q_BITS) | mu);
    @(posedge clk); #1;
    cfg.we = 1'b0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0;
    x   = '0;
    @(posedge clk); #1;
    for (int par = 0; par < 2; par++)
      for (int l = 0; l < LEVELS; l++) begin
        m_mu[par][l] = Q_BITS'($urandom);
        m_id[par][l] = IDX_W'($urandom);
        wr(1, par, l, int'(m_id[par][l]), int'(m_mu[par][l]));
        wr(0, par, l, int'(~m_id[par][l]), int'(~m_mu[par][l]));  // other variable
      end
    // another table kind at the same address must be ignored too
    cfg.we = 1'b1; cfg.tbl = CFG_RULE; cfg.addr = CFG_ADDR_W'(1 << (P_BITS + 1)); cfg.data = '1;
    @(posedge clk); #1; cfg.we = 1'b0;
    for (int l = 0; l < LEVELS; l++) begin
      x = P_BITS'(l);
      #1;
      checks++;
      if (mu_odd !== m_mu[0][l] || id_odd !== m_id[0][l] ||
          mu_even !== m_mu[1][l] || id_even !== m_id[1][l]) begin
        failures++;
        $display("level %0d: got odd %0d/%0d even %0d/%0d", l, mu_odd, id_odd, mu_even, id_even);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
